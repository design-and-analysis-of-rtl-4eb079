// multiplier: unsigned W x W multiplier (8 x 8 -> 16 bits by default), one
// of the sixteen coefficient-times-sample products of the FIR block.
//
// Written as a shift-and-add array: partial product i is the multiplicand
// ANDed with multiplier bit i and shifted left by i; the partial products
// are summed. Only the function (an unsigned product) is given for this
// unit; the array form is this design's choice, and synthesis may map it to
// any multiplier structure. Ports: a, b (W bits) -> p (2W bits).
// Combinational; no clock.
module multiplier #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  always_comb begin
    p = '0;
    for (int i = 0; i < W; i++) begin
      if (b[i]) p = p + ((2*W)'(a) << i);
    end
  end
endmodule
