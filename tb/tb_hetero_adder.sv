// tb_hetero_adder: self-checking test of the 18-bit heterogeneous adder
// (4-bit ripple, 10-bit look-ahead, 4-bit carry select).
// Directed operands drive a carry across each section boundary and through
// the whole word; then 20000 random operands follow. {cout, s} is compared
// with the exact sum a + b + cin. The test counts how often a carry crosses
// the ripple/look-ahead boundary and the look-ahead/select boundary and
// fails if either never happened.
module tb_hetero_adder;
  localparam int unsigned RCA_W = 4, CLA_W = 10, CSL_W = 4;
  localparam int unsigned W = RCA_W + CLA_W + CSL_W;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int carry_rca_cla = 0, carry_cla_csl = 0;

  hetero_adder #(.RCA_W(RCA_W), .CLA_W(CLA_W), .CSL_W(CSL_W)) dut (
    .a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic vc);
    logic [W:0] sum;
    logic [RCA_W:0] lo;
    logic [RCA_W+CLA_W:0] mid;
    a = va; b = vb; cin = vc;
    #1;
    sum = (W+1)'(va) + (W+1)'(vb) + (W+1)'(vc);
    lo  = (RCA_W+1)'(va[RCA_W-1:0]) + (RCA_W+1)'(vb[RCA_W-1:0]) + (RCA_W+1)'(vc);
    mid = (RCA_W+CLA_W+1)'(va[RCA_W+CLA_W-1:0]) + (RCA_W+CLA_W+1)'(vb[RCA_W+CLA_W-1:0])
        + (RCA_W+CLA_W+1)'(vc);
    if (lo[RCA_W]) carry_rca_cla++;
    if (mid[RCA_W+CLA_W]) carry_cla_csl++;
    checks++;
    if ({cout, s} !== sum) begin
      failures++;
      $display("FAIL %0d + %0d + %0d -> %0d (cout %0d)", va, vb, vc, s, cout);
    end
  endtask

  initial begin
    apply(18'h0000F, 18'h00001, 1'b0);   // carry out of the ripple section
    apply(18'h03FFF, 18'h00001, 1'b0);   // carry out of the look-ahead section
    apply(18'h3FFFF, 18'h00000, 1'b1);   // carry through every section
    apply(18'h3FFFF, 18'h3FFFF, 1'b1);
    apply(18'h3C000, 18'h04000, 1'b0);   // select section alone overflows
    apply(18'h00000, 18'h00000, 1'b0);
    for (int n = 0; n < 20000; n++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("carries ripple->look-ahead: %0d, look-ahead->select: %0d",
             carry_rca_cla, carry_cla_csl);
    checks++;
    if (carry_rca_cla == 0 || carry_cla_csl == 0) begin
      failures++;
      $display("FAIL a section boundary carry never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
