// hetero_adder: heterogeneous adder, 18 bits by default.
//
// The operand is split into three sections that use different adder
// architectures: a 4-bit ripple carry adder on the least significant bits, a
// 10-bit carry look-ahead adder in the middle and a 4-bit carry select adder
// on the most significant bits. The carry out of each section is the carry in
// of the next. The ripple section is cheap and its carry is ready early; the
// look-ahead section covers the long middle span quickly; the select section
// has its two candidate sums ready when the middle carry arrives. The
// section kinds and the 4/10/4 split follow the specification of the design;
// the order of the sections (ripple lowest, select highest) is this design's
// reading of it. Ports: a, b (RCA_W+CLA_W+CSL_W bits), cin -> s, cout.
// Combinational; no clock.
module hetero_adder #(
  parameter int unsigned RCA_W = 4,
  parameter int unsigned CLA_W = 10,
  parameter int unsigned CSL_W = 4,
  localparam int unsigned W    = RCA_W + CLA_W + CSL_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned LO = RCA_W;          // first bit of the CLA section
  localparam int unsigned HI = RCA_W + CLA_W;  // first bit of the CSL section

  logic            c_rca;  // carry from the ripple section into the CLA
  logic [CLA_W:0]  c_cla;  // carry vector of the CLA; c_cla[CLA_W] feeds the CSL

  rca #(.W(RCA_W)) u_rca (
    .a   (a[LO-1:0]),
    .b   (b[LO-1:0]),
    .cin (cin),
    .s   (s[LO-1:0]),
    .cout(c_rca)
  );

  cla #(.W(CLA_W)) u_cla (
    .a   (a[HI-1:LO]),
    .b   (b[HI-1:LO]),
    .cin (c_rca),
    .s   (s[HI-1:LO]),
    .c   (c_cla)
  );

  csla #(.W(CSL_W)) u_csla (
    .a   (a[W-1:HI]),
    .b   (b[W-1:HI]),
    .cin (c_cla[CLA_W]),
    .s   (s[W-1:HI]),
    .cout(cout)
  );
endmodule
