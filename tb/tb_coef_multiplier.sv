// tb_coef_multiplier -- checks the signed 16 x 18 product on corner values
// and random operands against 64-bit arithmetic.
module tb_coef_multiplier;
  logic signed [15:0] a;
  logic signed [17:0] b;
  logic signed [33:0] p;
  coef_multiplier #(.A_W(16), .B_W(18)) dut (.a, .b, .p);

  int checks = 0, failures = 0;
  task automatic try(longint x, longint y);
    a = 16'(x); b = 18'(y);
    #1;
    checks++;
    if (longint'(p) != longint'(a) * longint'(b)) begin
      failures++;
      $display("FAIL: %0d * %0d = %0d", a, b, p);
    end
  endtask

  initial begin
    try(-32768, -131072); try(32767, 131071); try(-32768, 131071); try(-1, -1); try(0, 5);
    for (int i = 0; i < 1000; i++) try(longint'($urandom), longint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
