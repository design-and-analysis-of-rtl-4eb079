// fir_hetero: 4 x 4 FIR block built from sixteen multipliers and nine
// heterogeneous adders (the top of the design).
//
// Given four coefficients h0..h3 and four samples x(n), x(n-1), x(n-2),
// x(n-3), the block computes all seven outputs of their linear convolution
//   fir_filter_out(k+1) = sum over i + j = k of h_j * x(n-i),   k = 0..6.
// Product m[4*i + j] = h_j * x(n-i) comes from its own multiplier (the
// sixteen multipliers are numbered 1..16 in the published tree, m0..m15
// here). Products on the same anti-diagonal are added in a ladder of nine
// 18-bit heterogeneous adders:
//   out1 = m0
//   out2 = m1 + m4
//   out3 = (m2 + m5) + m8                    add_out1 = m2 + m5
//   out4 = ((m3 + m6) + m9) + m12            add_out2 = m3 + m6,
//                                            add_out3 = add_out2 + m9
//   out5 = (m7 + m10) + m13                  add_out4 = m7 + m10
//   out6 = m11 + m14
//   out7 = m15
// The products, the adder count, the grouping and the intermediate names
// add_out1..add_out4 follow the published design. The block is purely
// combinational, as in the published simulation; the four samples arrive in
// parallel, so any delay line that forms x(n-1)..x(n-3) from a sample stream
// lies outside it. Operands are unsigned (the specification shows only
// non-negative values). The adders are 18 bits wide, enough for any sum of
// four 16-bit products; the outputs keep the low 16 bits, the width the
// specification gives them, so an output wraps when its true value exceeds
// 65535, and the two upper sum bits and the adders' carry outs are left
// unused on purpose.
module fir_hetero
  import fir_pkg::*;
(
  input  data_t h0,
  input  data_t h1,
  input  data_t h2,
  input  data_t h3,
  input  data_t x_n,
  input  data_t x_n_1,
  input  data_t x_n_2,
  input  data_t x_n_3,
  output out_t  fir_filter_out1,
  output out_t  fir_filter_out2,
  output out_t  fir_filter_out3,
  output out_t  fir_filter_out4,
  output out_t  fir_filter_out5,
  output out_t  fir_filter_out6,
  output out_t  fir_filter_out7
);
  data_t h [TAPS];
  data_t x [SAMPLES];
  prod_t m [NMUL];

  assign h = '{h0, h1, h2, h3};
  assign x = '{x_n, x_n_1, x_n_2, x_n_3};

  // Sixteen multipliers: m[4*i + j] = h_j * x(n-i).
  for (genvar i = 0; i < SAMPLES; i++) begin : g_row
    for (genvar j = 0; j < TAPS; j++) begin : g_col
      multiplier #(.W(DATA_W)) u_mul (
        .a(h[j]),
        .b(x[i]),
        .p(m[TAPS*i + j])
      );
    end
  end

  // Nine heterogeneous adders, operand pairs as listed above.
  sum_t out2, add_out1, out3, add_out2, add_out3, out4, add_out4, out5, out6;
  logic [NADD-1:0] add_co;  // carry outs, never set: 18 bits hold every sum

  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add1 (
    .a(sum_t'(m[1])), .b(sum_t'(m[4])), .cin(1'b0), .s(out2), .cout(add_co[0]));
  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add2 (
    .a(sum_t'(m[2])), .b(sum_t'(m[5])), .cin(1'b0), .s(add_out1), .cout(add_co[1]));
  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add3 (
    .a(add_out1), .b(sum_t'(m[8])), .cin(1'b0), .s(out3), .cout(add_co[2]));
  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add4 (
    .a(sum_t'(m[3])), .b(sum_t'(m[6])), .cin(1'b0), .s(add_out2), .cout(add_co[3]));
  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add5 (
    .a(add_out2), .b(sum_t'(m[9])), .cin(1'b0), .s(add_out3), .cout(add_co[4]));
  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add6 (
    .a(add_out3), .b(sum_t'(m[12])), .cin(1'b0), .s(out4), .cout(add_co[5]));
  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add7 (
    .a(sum_t'(m[7])), .b(sum_t'(m[10])), .cin(1'b0), .s(add_out4), .cout(add_co[6]));
  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add8 (
    .a(add_out4), .b(sum_t'(m[13])), .cin(1'b0), .s(out5), .cout(add_co[7]));
  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) u_add9 (
    .a(sum_t'(m[11])), .b(sum_t'(m[14])), .cin(1'b0), .s(out6), .cout(add_co[8]));

  assign fir_filter_out1 = out_t'(m[0]);
  assign fir_filter_out2 = out_t'(out2);
  assign fir_filter_out3 = out_t'(out3);
  assign fir_filter_out4 = out_t'(out4);
  assign fir_filter_out5 = out_t'(out5);
  assign fir_filter_out6 = out_t'(out6);
  assign fir_filter_out7 = out_t'(m[15]);
endmodule
