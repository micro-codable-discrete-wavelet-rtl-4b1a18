// tb_predict -- test of the predict module.
//
// Fills the N = 4 lambda window, then applies random coefficients and gamma
// inputs, with and without a shift in the same cycle, in forward and in
// inverse mode.  The expected output is computed in the testbench from a
// copy of the window: gamma -/+ floor((sum(lambda_j * F_j) + 2^13) / 2^14), wrapped
// to 16 bits, one cycle after the calc cycle.
module tb_predict;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic shift = 0, calc = 0, fw = 1;
  sample_t lam_in = '0, gam_in = '0, gam_out;
  logic [N-1:0][COEF_W-1:0] coef = '0;
  logic gam_out_valid;

  predict #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #(20 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int win[N];
  int expected;
  bit exp_valid;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      shift = 1; calc = 0; lam_in = 16'($urandom_range(65535));
      for (int j = 0; j < N - 1; j++) win[j] = win[j+1];
      win[N-1] = int'(lam_in);
    end
    for (int t = 0; t < 400; t++) begin
      longint acc;
      @(negedge clk);
      shift = ($urandom_range(1) == 1);
      calc = ($urandom_range(3) != 0);
      fw = ($urandom_range(1) == 1);
      lam_in = 16'($urandom_range(65535));
      gam_in = 16'($urandom_range(65535));
      for (int j = 0; j < N; j++) coef[j] = COEF_W'($urandom_range(262143));
      if (shift) begin
        for (int j = 0; j < N - 1; j++) win[j] = win[j+1];
        win[N-1] = int'(lam_in);
      end
      acc = 0;
      for (int j = 0; j < N; j++) acc += longint'(win[j]) * longint'(signed'(coef[j]));
      acc = (acc + 8192) >>> 14;
      expected = fw ? wrap16(longint'(gam_in) - acc) : wrap16(longint'(gam_in) + acc);
      exp_valid = calc;
      @(posedge clk);
      #1;
      checks++;
      if (gam_out_valid !== exp_valid || (exp_valid && int'(gam_out) != expected)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: out %0d valid %0b, expected %0d valid %0b",
                                    t, gam_out, gam_out_valid, expected, exp_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
