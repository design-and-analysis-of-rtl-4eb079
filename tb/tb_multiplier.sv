// tb_multiplier: exhaustive self-checking test of the 8 x 8 unsigned
// multiplier: all 65536 operand pairs, product compared with a * b
// computed in 32-bit integer arithmetic.
module tb_multiplier;
  localparam int unsigned W = 8;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  multiplier #(.W(W)) dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < (1 << W); va++)
      for (int vb = 0; vb < (1 << W); vb++) begin
        a = W'(va); b = W'(vb);
        #1;
        checks++;
        if (int'(p) != va * vb) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d -> %0d", va, vb, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
