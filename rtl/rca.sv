// rca: W-bit ripple carry adder, the least significant section of the
// heterogeneous adder (4 bits there).
//
// A chain of W full adders: the carry out of bit i is the carry in of bit
// i+1, so the delay grows linearly with W, which is acceptable for the short
// low section. Ports: a, b (W bits), cin -> s (W bits), cout. Combinational.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
