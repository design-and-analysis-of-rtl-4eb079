// tb_fir_hetero: end-to-end self-checking test of the 4 x 4 heterogeneous
// adder FIR block at its default sizes.
//
// Part 1 applies five published coefficient/sample sets and compares the
// seven outputs and the four intermediate sums add_out1..add_out4 with the
// published decimal results, written out here as constants.
// Part 2 applies 20000 random sets (full 8-bit range, plus a share of small
// values) and compares every output with a direct convolution
// y(k) = sum over i + j = k of h_j * x(n-i), truncated to 16 bits.
// The block's mechanisms are counted and each must occur at least once: a
// carry from the ripple into the look-ahead section and from the look-ahead
// into the carry select section of one of the nine adders, and an output
// whose exact value exceeds 16 bits and so wraps. The block is
// combinational; each set is held for one time unit before it is checked.
module tb_fir_hetero;
  import fir_pkg::*;

  data_t h0, h1, h2, h3, x_n, x_n_1, x_n_2, x_n_3;
  out_t  y [NOUT_TB];
  localparam int NOUT_TB = TAPS + SAMPLES - 1;

  int checks = 0, failures = 0;
  int n_carry_rca_cla = 0, n_carry_cla_csl = 0, n_wrap = 0;

  fir_hetero dut (
    .h0(h0), .h1(h1), .h2(h2), .h3(h3),
    .x_n(x_n), .x_n_1(x_n_1), .x_n_2(x_n_2), .x_n_3(x_n_3),
    .fir_filter_out1(y[0]), .fir_filter_out2(y[1]), .fir_filter_out3(y[2]),
    .fir_filter_out4(y[3]), .fir_filter_out5(y[4]), .fir_filter_out6(y[5]),
    .fir_filter_out7(y[6])
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the section-boundary carries of one addition a + b.
  task automatic count_add(int unsigned va, int unsigned vb);
    int unsigned lo_mask  = (1 << RCA_W) - 1;
    int unsigned mid_mask = (1 << (RCA_W + CLA_W)) - 1;
    if (((va & lo_mask) + (vb & lo_mask)) >> RCA_W != 0) n_carry_rca_cla++;
    if (((va & mid_mask) + (vb & mid_mask)) >> (RCA_W + CLA_W) != 0) n_carry_cla_csl++;
  endtask

  task automatic apply_random(int unsigned hv[4], int unsigned xv[4]);
    int unsigned m [16];
    int unsigned ref_y [7];
    {h0, h1, h2, h3} = {8'(hv[0]), 8'(hv[1]), 8'(hv[2]), 8'(hv[3])};
    {x_n, x_n_1, x_n_2, x_n_3} = {8'(xv[0]), 8'(xv[1]), 8'(xv[2]), 8'(xv[3])};
    #1;
    foreach (ref_y[k]) ref_y[k] = 0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        m[4*i + j] = hv[j] * xv[i];
        ref_y[i + j] += hv[j] * xv[i];
      end
    // the nine additions of the adder ladder
    count_add(m[1], m[4]);
    count_add(m[2], m[5]);
    count_add(m[2] + m[5], m[8]);
    count_add(m[3], m[6]);
    count_add(m[3] + m[6], m[9]);
    count_add(m[3] + m[6] + m[9], m[12]);
    count_add(m[7], m[10]);
    count_add(m[7] + m[10], m[13]);
    count_add(m[11], m[14]);
    for (int k = 0; k < 7; k++) begin
      if (ref_y[k] > 32'hFFFF) n_wrap++;
      checks++;
      if (y[k] !== 16'(ref_y[k])) begin
        failures++;
        if (failures < 10)
          $display("FAIL out%0d = %0d, expected %0d", k + 1, y[k], 16'(ref_y[k]));
      end
    end
  endtask

  // Published vectors: h0..h3, x(n)..x(n-3), out1..out7, add_out1..add_out4.
  typedef struct {
    int unsigned h [4];
    int unsigned x [4];
    int unsigned y [7];
    int unsigned a [4];
  } vec_t;

  vec_t pub [5];

  initial begin
    pub[0] = '{h: '{5, 6, 7, 8},     x: '{2, 1, 6, 8},
               y: '{10, 17, 50, 99, 98, 104, 64},    a: '{20, 23, 59, 50}};
    pub[1] = '{h: '{1, 3, 5, 7},     x: '{11, 12, 13, 14},
               y: '{11, 45, 104, 190, 191, 161, 98}, a: '{91, 137, 176, 149}};
    pub[2] = '{h: '{10, 20, 30, 40}, x: '{1, 2, 3, 4},
               y: '{10, 40, 100, 200, 250, 240, 160}, a: '{70, 100, 160, 170}};
    pub[3] = '{h: '{9, 8, 7, 6},     x: '{4, 3, 2, 1},
               y: '{36, 59, 70, 70, 40, 19, 6},      a: '{52, 45, 61, 32}};
    pub[4] = '{h: '{5, 4, 3, 2},     x: '{6, 7, 8, 9},
               y: '{30, 59, 86, 110, 74, 43, 18},    a: '{46, 33, 65, 38}};

    foreach (pub[v]) begin
      {h0, h1, h2, h3} = {8'(pub[v].h[0]), 8'(pub[v].h[1]), 8'(pub[v].h[2]), 8'(pub[v].h[3])};
      {x_n, x_n_1, x_n_2, x_n_3} = {8'(pub[v].x[0]), 8'(pub[v].x[1]),
                                    8'(pub[v].x[2]), 8'(pub[v].x[3])};
      #1;
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (int'(y[k]) != pub[v].y[k]) begin
          failures++;
          $display("FAIL set %0d out%0d = %0d, published %0d", v, k + 1, y[k], pub[v].y[k]);
        end
      end
      checks++;
      if (int'(dut.add_out1) != pub[v].a[0] || int'(dut.add_out2) != pub[v].a[1] ||
          int'(dut.add_out3) != pub[v].a[2] || int'(dut.add_out4) != pub[v].a[3]) begin
        failures++;
        $display("FAIL set %0d add_out = %0d %0d %0d %0d", v,
                 dut.add_out1, dut.add_out2, dut.add_out3, dut.add_out4);
      end
    end

    for (int n = 0; n < 20000; n++) begin
      int unsigned hv [4], xv [4];
      int unsigned lim = (n % 4 == 0) ? 16 : 256;
      foreach (hv[j]) hv[j] = $urandom % lim;
      foreach (xv[i]) xv[i] = $urandom % lim;
      apply_random(hv, xv);
    end
    // largest operands: every output wraps except the two single products
    apply_random('{255, 255, 255, 255}, '{255, 255, 255, 255});

    $display("carries ripple->look-ahead: %0d, look-ahead->select: %0d, wrapped outputs: %0d",
             n_carry_rca_cla, n_carry_cla_csl, n_wrap);
    checks++;
    if (n_carry_rca_cla == 0 || n_carry_cla_csl == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
