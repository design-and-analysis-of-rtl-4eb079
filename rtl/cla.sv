// cla: W-bit carry look-ahead adder (10 bits in the heterogeneous adder),
// the middle section of the heterogeneous adder.
//
// Every bit cell forms generate g = a & b and propagate p = a ^ b. A
// look-ahead carry unit then derives all carries at once instead of rippling
// them: the carry in is folded into bit 0 (g0' = g0 | p0 & cin), and a
// parallel-prefix network of ceil(log2 W) levels combines (G, P) pairs,
//   (G, P)[i] <- (G[i] | P[i] & G[i-d], P[i] & P[i-d])   for d = 1, 2, 4, 8,
// after which G[i] is the carry out of bit i. The sum bit is s[i] = p[i] ^ c[i].
// The ports follow the adder's published symbol: a<9:0>, b<9:0>, cin in;
// s<9:0> and the whole carry vector c<10:0> out, where c[0] equals cin and
// c[W] is the carry out to the next section. Only the adder's function and
// ports are given; the prefix form of the look-ahead unit is this design's
// choice. Combinational; no clock.
module cla #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W:0]   c
);
  logic [W-1:0] g;
  logic [W-1:0] p;

  assign g = a & b;
  assign p = a ^ b;

  localparam int unsigned LEVELS = (W > 1) ? $clog2(W) : 1;

  // Look-ahead carry unit: parallel prefix over the (generate, propagate) pairs.
  logic [W-1:0] gl [LEVELS+1];
  logic [W-1:0] pl [LEVELS+1];

  always_comb begin
    gl[0]    = g;
    pl[0]    = p;
    gl[0][0] = g[0] | (p[0] & cin);
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][i - (1 << l)]);
          pl[l+1][i] = pl[l][i] & pl[l][i - (1 << l)];
        end else begin
          gl[l+1][i] = gl[l][i];
          pl[l+1][i] = pl[l][i];
        end
      end
    end
  end

  assign c = {gl[LEVELS], cin};

  assign s = p ^ c[W-1:0];
endmodule
