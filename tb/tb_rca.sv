// tb_rca: exhaustive self-checking test of the 4-bit ripple carry adder.
// Every a, b and cin is applied; {cout, s} is compared with a + b + cin.
module tb_rca;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  rca #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << W); va++)
      for (int vb = 0; vb < (1 << W); vb++)
        for (int vc = 0; vc < 2; vc++) begin
          a = W'(va); b = W'(vb); cin = 1'(vc);
          #1;
          checks++;
          if ({cout, s} !== (W+1)'(va + vb + vc)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> %0d (cout %0d)", va, vb, vc, s, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
