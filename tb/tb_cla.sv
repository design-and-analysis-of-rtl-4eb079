// tb_cla: self-checking test of the 10-bit carry look-ahead adder.
// It checks the sum and the whole carry vector c<10:0>. The expected carry
// into bit i is bit i of the exact sum of the low i bits of a and b plus
// cin. First a published test vector is applied (a = 0000111100,
// b = 1111000011, cin = 0 gives s = 1111111111 and an all-zero carry
// vector), then a long carry chain, then 20000 random operands.
module tb_cla;
  localparam int unsigned W = 10;
  logic [W-1:0] a, b, s;
  logic         cin;
  logic [W:0]   c;
  int checks = 0, failures = 0;

  cla #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .c(c));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W:0] carries(logic [W-1:0] x, logic [W-1:0] y, logic ci);
    logic [W:0] r;
    for (int i = 0; i <= W; i++) begin
      longint unsigned lo_x, lo_y, t;
      lo_x = longint'(x) & ((64'd1 << i) - 1);
      lo_y = longint'(y) & ((64'd1 << i) - 1);
      t    = lo_x + lo_y + longint'(ci);
      r[i] = t[i];
    end
    return r;
  endfunction

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic vc);
    logic [W:0] sum;
    a = va; b = vb; cin = vc;
    #1;
    sum = (W+1)'(va) + (W+1)'(vb) + (W+1)'(vc);
    checks++;
    if (s !== sum[W-1:0] || c !== carries(va, vb, vc)) begin
      failures++;
      $display("FAIL a=%b b=%b cin=%b -> s=%b c=%b, expected s=%b c=%b",
               va, vb, vc, s, c, sum[W-1:0], carries(va, vb, vc));
    end
  endtask

  initial begin
    // Published vector: expected values written out, not computed.
    a = 10'b0000111100; b = 10'b1111000011; cin = 1'b0;
    #1;
    checks++;
    if (s !== 10'b1111111111 || c !== 11'b00000000000) begin
      failures++;
      $display("FAIL published vector: s=%b c=%b", s, c);
    end
    // Carry entering at cin and rippling through every bit.
    apply(10'b1111111111, 10'b0000000000, 1'b1);
    apply(10'b1111111111, 10'b1111111111, 1'b1);
    for (int n = 0; n < 20000; n++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
