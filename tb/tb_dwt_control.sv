// tb_dwt_control -- test of the 2-D control unit.
//
// Two instances: the default 64 x 32 picture and a 128 x 32 picture with
// N = NT = 4.  A small responder answers each line_start with line_done
// after a random delay.  Every line command is compared with a list built
// in the testbench from the 2-D algorithm (pass order, every step-th line,
// base, stride, length, lifting base); for 128 x 32 the sequence of passes
// must also be the one of the worked example: forward R0 C0 R1 C1 R2 C2 R3
// R4, inverse R4 R3 C2 R2 C1 R1 C0 R0.
module tb_dwt_control;
  import dwt_pkg::*;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    #(20 * 400000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  typedef struct { bit cols; int lv; int base; int stride; int len; int lift; } cmd_t;

  // ---------- instance A: 64 x 32
  logic sa = 0, fa = 1, ba, da, lsa, lfa, lda = 0, pca;
  logic [10:0] lba, lsta; logic [15:0] lla; logic [6:0] lla_lift; logic [3:0] pla;
  dwt_control #(.WIDTH(64), .HEIGHT(32)) u_a (
    .clk, .rst_n, .start(sa), .fw(fa), .busy(ba), .done(da), .line_start(lsa), .line_fw(lfa),
    .line_base(lba), .line_stride(lsta), .line_len(lla), .line_lift(lla_lift), .line_done(lda),
    .pass_level(pla), .pass_cols(pca));
  // ---------- instance B: 128 x 32
  logic sb = 0, fb = 1, bb, db, lsb, lfb, ldb = 0, pcb;
  logic [11:0] lbb, lstb; logic [15:0] llb; logic [7:0] llb_lift; logic [3:0] plb;
  dwt_control #(.WIDTH(128), .HEIGHT(32)) u_b (
    .clk, .rst_n, .start(sb), .fw(fb), .busy(bb), .done(db), .line_start(lsb), .line_fw(lfb),
    .line_base(lbb), .line_stride(lstb), .line_len(llb), .line_lift(llb_lift), .line_done(ldb),
    .pass_level(plb), .pass_cols(pcb));

  // responders
  initial forever begin
    @(posedge clk iff lsa);
    repeat ($urandom_range(6)) @(posedge clk);
    @(negedge clk) lda = 1;
    @(negedge clk) lda = 0;
  end
  initial forever begin
    @(posedge clk iff lsb);
    repeat ($urandom_range(3)) @(posedge clk);
    @(negedge clk) ldb = 1;
    @(negedge clk) ldb = 0;
  end

  cmd_t got[2][$], exp_q[$];
  always @(posedge clk) begin
    if (lsa) got[0].push_back('{pca, int'(pla), int'(lba), int'(lsta), int'(lla), int'(lla_lift)});
    if (lsb) got[1].push_back('{pcb, int'(plb), int'(lbb), int'(lstb), int'(llb), int'(llb_lift)});
  end

  function automatic int gam(int len, int lv);
    int t = 0;
    for (int l = 0; l < lv; l++) t += ((len + (1 << l) - 1) >> l) / 2;
    return t;
  endfunction

  function automatic void expected(int w, int h, int nx, int ny, bit fw);
    int nl = (nx > ny) ? nx : ny;
    exp_q.delete();
    for (int i = 0; i < nl; i++) begin
      int lv = fw ? i : nl - 1 - i;
      for (int d = 0; d < 2; d++) begin
        bit cols = fw ? bit'(d) : bit'(1 - d);
        int step = 1 << lv;
        if (cols && lv < ny)
          for (int x = 0; x < w; x += step)
            exp_q.push_back('{1, lv, x, w * step, (h + step - 1) / step, gam(w, nx) + gam(h, lv)});
        if (!cols && lv < nx)
          for (int y = 0; y < h; y += step)
            exp_q.push_back('{0, lv, y * w, step, (w + step - 1) / step, gam(w, lv)});
      end
    end
  endfunction

  function automatic string cstr(cmd_t c);
    return $sformatf("%s%0d base %0d stride %0d len %0d lift %0d",
                     c.cols ? "C" : "R", c.lv, c.base, c.stride, c.len, c.lift);
  endfunction

  function automatic string passes(int k);
    string s = "";
    foreach (got[k][i])
      if (i == 0 || got[k][i].cols != got[k][i-1].cols || got[k][i].lv != got[k][i-1].lv)
        s = {s, got[k][i].cols ? "C" : "R", $sformatf("%0d ", got[k][i].lv)};
    return s;
  endfunction

  task automatic compare(int k, string tag);
    chk(got[k].size() == exp_q.size(), $sformatf("%s: %0d lines, expected %0d", tag, got[k].size(), exp_q.size()));
    foreach (exp_q[i]) if (i < got[k].size())
      chk(cstr(got[k][i]) == cstr(exp_q[i]), $sformatf("%s line %0d: got %s expected %s", tag, i, cstr(got[k][i]), cstr(exp_q[i])));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 1; f >= 0; f--) begin
      got[0].delete(); got[1].delete();
      @(negedge clk) begin sa = 1; fa = bit'(f); sb = 1; fb = bit'(f); end
      @(negedge clk) begin sa = 0; sb = 0; end
      fork
        @(posedge clk iff da);
        @(posedge clk iff db);
      join
      @(negedge clk);
      expected(64, 32, 4, 3, bit'(f));
      compare(0, f ? "64x32 fw" : "64x32 iv");
      expected(128, 32, 5, 3, bit'(f));
      compare(1, f ? "128x32 fw" : "128x32 iv");
      chk(passes(1) == (f ? "R0 C0 R1 C1 R2 C2 R3 R4 " : "R4 R3 C2 R2 C1 R1 C0 R0 "),
          {"pass order ", passes(1)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
