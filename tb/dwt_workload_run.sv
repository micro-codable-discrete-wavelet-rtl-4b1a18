// dwt_workload_run -- one picture-size / filter workload of the transform
// unit, used by tb_dwt_workloads.
//
// On go it loads the predict filter (polynomial interpolation weights) and
// the lifting coefficients derived from moments, loads a random 8-bit
// picture, runs a forward transform, compares every coefficient with the
// reference model, requires a mean distance below 1 from the unrounded
// real-valued transform (the accuracy expected of 14-bit coefficients with
// filters of degree below 4), runs the inverse transform and compares with
// the original picture.  The
// forward cycle count is reported next to the count given for the same
// workload by the original hardware (PAPER_CYCLES) and checked against the
// bound of this implementation: every line costs at most ceil(C/2) + 24
// cycles plus 4 cycles of pass overhead, and it must lie within 5% of the
// published count.  finished rises when done.
module dwt_workload_run
  import dwt_pkg::*;
  import dwt_ref_pkg::*;
#(
  parameter int W = 176,
  parameter int H = 144,
  parameter int NP = 4,
  parameter int NU = 4,
  parameter int PAPER_CYCLES = 46000
) (
  input  logic clk,
  input  logic ram_clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output longint fw_cycles
);
  localparam int AW = $clog2(W * H);
  localparam int NM = (NP > NU) ? NP : NU;
  localparam int NL = levels((W > H) ? W : H, NM);
  localparam int CBW = $clog2(NM);
  localparam int LD = lift_depth(W, H, NM);
  localparam int CAW = ($clog2(LD + 1) > $clog2(NP / 2 + 1)) ? $clog2(LD + 1) : $clog2(NP / 2 + 1);

  logic start = 0, fw = 1, busy, done;
  logic ext_we = 0;
  logic [AW-2:0] ext_addr = '0, ext_raddr = '0;
  logic [1:0][DATA_W-1:0] ext_wdata = '0, ext_rdata;
  logic coef_we = 0, coef_sel = 0;
  logic [CBW-1:0] coef_bank = '0;
  logic [CAW-1:0] coef_addr = '0;
  logic [COEF_W-1:0] coef_wdata = '0;
  logic stall_first, wait_second, pass_cols;
  logic [3:0] pass_level;

  dwt_transform #(.WIDTH(W), .HEIGHT(H), .N(NP), .NT(NU)) dut (.*);

  longint cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %0dx%0d %0d-%0d: %s", W, H, NP, NU, what);
    end
  endtask

  task automatic write_coef(bit sel, int bank, int addr, int val);
    @(negedge clk);
    coef_we = 1; coef_sel = sel; coef_bank = CBW'(bank); coef_addr = CAW'(addr);
    coef_wdata = COEF_W'(val);
    @(negedge clk) coef_we = 0;
  endtask

  task automatic run(bit f, output longint cycles);
    longint t0;
    @(negedge clk);
    start = 1; fw = f;
    t0 = cycle;
    @(negedge clk) start = 0;
    @(posedge clk iff done);
    cycles = cycle - t0;
  endtask

  // cycle bound of this implementation for a forward transform
  function automatic longint bound();
    longint b = 0;
    int nx = levels(W, NM), ny = levels(H, NM);
    for (int lv = 0; lv < NL; lv++) begin
      int step = 1 << lv;
      if (lv < nx) b += longint'(ceil_div(H, step)) * (ceil_div(ceil_div(W, step), 2) + 24) + 4;
      if (lv < ny) b += longint'(ceil_div(W, step)) * (ceil_div(ceil_div(H, step), 2) + 24) + 4;
    end
    return b;
  endfunction

  initial begin
    dwt_model m;
    int orig[], res[];
    longint cyc;
    real err;
    finished = 0; checks = 0; failures = 0; fw_cycles = 0;
    wait (go && rst_n);
    m = new(W, H, NP, NU);
    for (int r = 0; r <= NP / 2; r++)
      for (int j = 0; j < NP; j++) write_coef(0, j, r, pred_coef(NP, r, j));
    m.make_lifting();
    foreach (m.lift[a]) for (int j = 0; j < NU; j++) write_coef(1, j, a, m.lift[a][j]);
    orig = new[W * H];
    foreach (orig[i]) orig[i] = int'($urandom_range(255));
    m.pic = new[W * H](orig);
    for (int a = 0; a < W * H / 2; a++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = (AW-1)'(a);
      ext_wdata[0] = DATA_W'(orig[2 * a]);
      ext_wdata[1] = DATA_W'(orig[2 * a + 1]);
    end
    @(negedge clk) ext_we = 0;

    run(1, cyc);
    fw_cycles = cyc;
    m.transform(1);
    res = new[W * H];
    @(negedge clk) ext_raddr = '0;
    for (int a = 0; a < W * H / 2; a++) begin
      @(negedge clk);
      res[2 * a]     = int'(signed'(ext_rdata[0]));
      res[2 * a + 1] = int'(signed'(ext_rdata[1]));
      ext_raddr = (AW-1)'(a + 1);
    end
    foreach (res[i]) check(res[i] == m.pic[i], $sformatf("forward sample %0d: %0d, model %0d", i, res[i], m.pic[i]));
    foreach (orig[i]) m.rpic[i] = real'(orig[i]);
    m.rtransform();
    err = 0.0;
    foreach (res[i]) err += (res[i] > m.rpic[i]) ? res[i] - m.rpic[i] : m.rpic[i] - res[i];
    err = err / (W * H);
    check(err < 1.0, $sformatf("mean error %0.3f against the exact transform", err));
    check(cyc <= bound(), $sformatf("forward took %0d cycles, bound %0d", cyc, bound()));
    check(cyc * 100 >= longint'(PAPER_CYCLES) * 95 && cyc * 100 <= longint'(PAPER_CYCLES) * 105,
          $sformatf("forward took %0d cycles, not within 5%% of %0d", cyc, PAPER_CYCLES));
    $display("%0dx%0d filter %0d-%0d: forward %0d cycles (%0.2f cycles/pixel); original hardware %0d cycles (%0.2f); mean error %0.3f",
             W, H, NP, NU, cyc, real'(cyc) / (W * H), PAPER_CYCLES, real'(PAPER_CYCLES) / (W * H), err);

    run(0, cyc);
    @(negedge clk) ext_raddr = '0;
    for (int a = 0; a < W * H / 2; a++) begin
      @(negedge clk);
      res[2 * a]     = int'(signed'(ext_rdata[0]));
      res[2 * a + 1] = int'(signed'(ext_rdata[1]));
      ext_raddr = (AW-1)'(a + 1);
    end
    foreach (res[i]) check(res[i] == orig[i], $sformatf("reconstructed sample %0d: %0d, original %0d", i, res[i], orig[i]));
    finished = 1;
  end
endmodule
