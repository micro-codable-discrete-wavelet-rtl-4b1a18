// tb_update -- test of the update module.
//
// Drives random sequences of the four configurations (fill and empty with
// gamma = 0 and next_lambda = 1, in-place with next_lambda = 0, shift with
// next_lambda = 1) in forward and inverse mode, and checks lam_out and
// lam_out_valid one cycle later against a window model kept in the
// testbench: out_j = lambda_j +/- floor((gamma * L_j + 2^13) / 2^14), wrapped to 16
// bits.  It also checks the final window by draining it with empty cycles.
module tb_update;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NT = 4;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic enable = 0, next_lambda = 0, write_out = 0, fw = 1;
  sample_t lam_in = '0, gam_in = '0, lam_out;
  logic [NT-1:0][COEF_W-1:0] coef = '0;
  logic lam_out_valid;

  update #(.NT(NT)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #(20 * 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int win[NT], outv[NT];
  int n_cfg[4] = '{default: 0};

  task automatic step(bit en, bit nl, bit wr, bit f, int lam, int gam);
    @(negedge clk);
    enable = en; next_lambda = nl; write_out = wr; fw = f;
    lam_in = 16'(lam); gam_in = 16'(gam);
    for (int j = 0; j < NT; j++) coef[j] = COEF_W'($urandom_range(262143));
    for (int j = 0; j < NT; j++) begin
      longint u = (longint'(signed'(gam_in)) * longint'(signed'(coef[j])) + 8192) >>> 14;
      outv[j] = f ? wrap16(longint'(win[j]) + u) : wrap16(longint'(win[j]) - u);
    end
    @(posedge clk);
    #1;
    checks++;
    if (lam_out_valid !== (en && nl && wr) || (en && nl && wr && int'(lam_out) != outv[0])) begin
      failures++;
      if (failures < 10) $display("FAIL: out %0d valid %0b expected %0d", lam_out, lam_out_valid, outv[0]);
    end
    if (en) begin
      if (nl) begin
        for (int j = 0; j < NT - 1; j++) win[j] = outv[j+1];
        win[NT-1] = int'(signed'(16'(lam)));
      end else begin
        for (int j = 0; j < NT; j++) win[j] = outv[j];
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NT; k++) begin step(1, 1, 0, 1, int'($urandom_range(65535)), 0); n_cfg[0]++; end
    for (int t = 0; t < 400; t++) begin
      int c;
      bit f;
      c = int'($urandom_range(2));
      f = ($urandom_range(1) == 1);
      if (c == 0) begin step(1, 0, 0, f, 0, int'($urandom_range(65535))); n_cfg[1]++; end
      else if (c == 1) begin step(1, 1, 1, f, int'($urandom_range(65535)), int'($urandom_range(65535))); n_cfg[2]++; end
      else step(0, 1, 1, f, 0, int'($urandom_range(65535)));
    end
    for (int k = 0; k < NT; k++) begin step(1, 1, 1, 1, 0, 0); n_cfg[3]++; end
    checks++;
    if (n_cfg[0] == 0 || n_cfg[1] == 0 || n_cfg[2] == 0 || n_cfg[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
