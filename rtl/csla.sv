// csla: W-bit carry select adder (4 bits), the most significant section of
// the heterogeneous adder.
//
// Two W-bit ripple carry adders compute the section's sum and carry out for
// an incoming carry of 0 and of 1 at the same time; the real carry in, which
// arrives last from the section below, only selects one of the two results
// through a multiplexer. Ports: a, b (W bits), cin -> s (W bits), cout.
// Combinational; no clock.
module csla #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] s0, s1;
  logic         c0, c1;

  rca #(.W(W)) u_rca0 (.a(a), .b(b), .cin(1'b0), .s(s0), .cout(c0));
  rca #(.W(W)) u_rca1 (.a(a), .b(b), .cin(1'b1), .s(s1), .cout(c1));

  always_comb begin
    if (cin) begin
      s    = s1;
      cout = c1;
    end else begin
      s    = s0;
      cout = c0;
    end
  end
endmodule
