// tb_dwt_transform -- end-to-end test of the 2-D wavelet transform unit at
// its default size (64 x 32 picture, N = NT = 4).
//
// Loads the predict filter (polynomial interpolation weights) and the
// lifting coefficients derived from moments through the coefficient port,
// then:
//   1. a constant picture is transformed forward: every output must be the
//      constant (a surviving lambda) or 0 (a wavelet coefficient), which the
//      interpolating predict filter guarantees independently of any model;
//   2. a random 8-bit picture is transformed forward and compared with the
//      reference model sample by sample; its mean distance from an unrounded
//      real-valued transform with exact coefficients must stay below 1 (an
//      average error under 1 on a 0..255 input is the accuracy expected of
//      14-bit coefficients with filters of degree below 4); it is then
//      transformed back and compared with the original picture;
//   3. the lifting table is reloaded with pseudo-random coefficients and
//      step 2 is repeated without the accuracy check (reconstruction must
//      be exact for any coefficients);
// and counts how often each mechanism of the unit occurred: update fill,
// in-place, shift and empty configurations, boundary predictions that hold
// the lambda window, mirrored predict-filter rows, second-stage waits on the
// FIFOs, skipped column passes, cycles with two RAM writes and two RAM
// reads, forward and inverse runs.  A mechanism that never occurs is a
// failure.  The cycles of each transform are reported.
module tb_dwt_transform;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = 64, H = 32, NP = 4, NU = 4;
  localparam int AW = $clog2(W * H);

  logic clk = 0, ram_clk = 0, rst_n = 0;
  logic start = 0, fw = 1, busy, done;
  logic ext_we = 0;
  logic [AW-2:0] ext_addr = '0, ext_raddr = '0;
  logic [1:0][DATA_W-1:0] ext_wdata = '0, ext_rdata;
  logic coef_we = 0, coef_sel = 0;
  logic [1:0] coef_bank = '0;
  logic [6:0] coef_addr = '0;
  logic [COEF_W-1:0] coef_wdata = '0;
  logic stall_first, wait_second, pass_cols;
  logic [3:0] pass_level;

  dwt_transform dut (.*);

  always #10 clk = ~clk;
  initial begin
    #15;
    forever begin ram_clk = 1; #5; ram_clk = 0; #5; end
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    #(20 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_fill, n_inplace, n_shift, n_empty, n_hold, n_mirror, n_wait, n_skip, n_quad;
  int n_fw_runs, n_iv_runs;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_engine.ue_v &&  dut.u_engine.ue_gzero && !dut.u_engine.ue_write) n_fill++;
    if (dut.u_engine.ue_v &&  dut.u_engine.ue_gzero &&  dut.u_engine.ue_write) n_empty++;
    if (dut.u_engine.ue_v && !dut.u_engine.ue_gzero && !dut.u_engine.ue_next) n_inplace++;
    if (dut.u_engine.ue_v && !dut.u_engine.ue_gzero &&  dut.u_engine.ue_next) n_shift++;
    if (dut.u_engine.pe_calc && !dut.u_engine.pe_shift) n_hold++;
    if (dut.u_engine.pe_calc && dut.u_engine.pe_mirror) n_mirror++;
    if (wait_second) n_wait++;
    if (busy && int'(dut.u_control.state) == 1 && !dut.u_control.pass_on
        && int'(dut.u_control.pass) < 2 * dut.u_control.NL) n_skip++;
    if (busy && dut.wa_en && dut.wb_en) n_quad++;
  end

  dwt_model m;
  int orig[];

  task automatic load_picture(int img[]);
    for (int a = 0; a < W * H / 2; a++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = AW'(a);
      ext_wdata[0] = DATA_W'(img[2 * a]);
      ext_wdata[1] = DATA_W'(img[2 * a + 1]);
    end
    @(negedge clk) ext_we = 0;
  endtask

  task automatic read_picture(output int img[]);
    img = new[W * H];
    @(negedge clk) ext_raddr = '0;
    for (int a = 0; a < W * H / 2; a++) begin
      @(negedge clk);
      img[2 * a]     = int'(signed'(ext_rdata[0]));
      img[2 * a + 1] = int'(signed'(ext_rdata[1]));
      ext_raddr = AW'(a + 1);
    end
  endtask

  task automatic run(bit f, output longint cycles);
    longint t0;
    @(negedge clk);
    start = 1; fw = f;
    t0 = cycle;
    @(negedge clk) start = 0;
    @(posedge clk iff done);
    cycles = cycle - t0;
    if (f) n_fw_runs++; else n_iv_runs++;
    $display("%s transform: %0d cycles, %0.2f cycles/pixel", f ? "forward" : "inverse",
             cycles, real'(cycles) / (W * H));
  endtask

  task automatic write_coef(bit sel, int bank, int addr, int val);
    @(negedge clk);
    coef_we = 1; coef_sel = sel; coef_bank = 2'(bank); coef_addr = 7'(addr);
    coef_wdata = COEF_W'(val);
    @(negedge clk) coef_we = 0;
  endtask

  initial begin
    int res[], back[];
    longint cyc;
    int c;
    bit ok;
    real err;
    m = new(W, H, NP, NU);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // predict filter rows 0..N/2
    for (int r = 0; r <= NP / 2; r++)
      for (int j = 0; j < NP; j++) write_coef(0, j, r, pred_coef(NP, r, j));
    // lifting coefficients from moments
    m.make_lifting();
    foreach (m.lift[a]) for (int j = 0; j < NU; j++) write_coef(1, j, a, m.lift[a][j]);
    check(m.nx == 4 && m.ny == 3, "level counts 4 / 3 for 64 x 32");

    // 1. constant picture
    c = 100;
    orig = new[W * H];
    foreach (orig[i]) orig[i] = c;
    load_picture(orig);
    run(1, cyc);
    read_picture(res);
    ok = 1;
    foreach (res[i]) if (res[i] != c && res[i] != 0) ok = 0;
    check(ok, "constant picture: outputs are the constant or zero");
    check(res[0] == c, "constant picture: coarsest lambda keeps the constant");

    // 2. random picture, forward, model comparison, inverse
    foreach (orig[i]) orig[i] = int'($urandom_range(255));
    m.pic = new[W * H](orig);
    load_picture(orig);
    run(1, cyc);
    read_picture(res);
    m.transform(1);
    foreach (res[i]) check(res[i] == m.pic[i], $sformatf("forward sample %0d: %0d, model %0d", i, res[i], m.pic[i]));
    foreach (orig[i]) m.rpic[i] = real'(orig[i]);
    m.rtransform();
    err = 0.0;
    foreach (res[i]) err += (res[i] > m.rpic[i]) ? res[i] - m.rpic[i] : m.rpic[i] - res[i];
    err = err / (W * H);
    $display("mean error against the exact transform: %0.3f", err);
    check(err < 1.0, $sformatf("mean error %0.3f is not below 1", err));
    run(0, cyc);
    read_picture(back);
    foreach (back[i]) check(back[i] == orig[i], $sformatf("reconstructed sample %0d: %0d, original %0d", i, back[i], orig[i]));
    // model must also invert
    m.transform(0);
    foreach (back[i]) check(m.pic[i] == orig[i], "model reconstruction");

    // 3. pseudo-random lifting coefficients in [-0.5, 0.5)
    foreach (m.lift[a]) for (int j = 0; j < NU; j++) begin
      m.lift[a][j] = int'($urandom_range(16383)) - 8192;
      write_coef(1, j, a, m.lift[a][j]);
    end
    foreach (orig[i]) orig[i] = int'($urandom_range(255));
    m.pic = new[W * H](orig);
    load_picture(orig);
    run(1, cyc);
    read_picture(res);
    m.transform(1);
    foreach (res[i]) check(res[i] == m.pic[i], $sformatf("random lifting, forward sample %0d", i));
    run(0, cyc);
    read_picture(back);
    foreach (back[i]) check(back[i] == orig[i], $sformatf("random lifting, reconstructed sample %0d", i));

    $display("mechanisms: fill=%0d inplace=%0d shift=%0d empty=%0d hold=%0d mirror=%0d wait=%0d skip=%0d quad=%0d fw=%0d iv=%0d",
             n_fill, n_inplace, n_shift, n_empty, n_hold, n_mirror, n_wait, n_skip, n_quad, n_fw_runs, n_iv_runs);
    check(n_fill > 0,    "update fill configuration used");
    check(n_inplace > 0, "update in-place configuration used");
    check(n_shift > 0,   "update shift configuration used");
    check(n_empty > 0,   "update empty configuration used");
    check(n_hold > 0,    "predict window held for boundary gammas");
    check(n_mirror > 0,  "mirrored predict filter rows used");
    check(n_wait > 0,    "second stage waited on a FIFO");
    check(n_skip > 0,    "a pass was skipped for the shorter dimension");
    check(n_quad > 0,    "two writes and two reads in one cycle");
    check(n_fw_runs > 0 && n_iv_runs > 0, "forward and inverse runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
