// tb_lifting_1d -- test of the 1-D lifting engine on single lines.
//
// The engine is connected to a picture RAM and two filter RAMs.  Lines of
// several lengths (even and odd), strides and base addresses are transformed
// forward and compared with the reference model, then transformed back and
// compared with the original data.  The engine is built with a small FIFO
// (depth 12, against the default 16) so that the first-stage hold on a filling FIFO also occurs.
// For a long line the cycle count must show the steady-state rate of one
// gamma and one lambda per cycle: at most C/2 + 24 cycles for C samples.
module tb_lifting_1d;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NP = 4, NU = 4, AW = 10, WORDS = 1 << AW, LIFT_AW = 9;
  localparam int LDEPTH = 1 << LIFT_AW;
  localparam int FD = 12;

  logic clk = 0, ram_clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  initial begin
    #15;
    forever begin ram_clk = 1; #5; ram_clk = 0; #5; end
  end

  logic start = 0, fw = 1, busy, done;
  logic [AW-1:0] base = '0, stride = '0;
  logic [15:0] len = '0;
  logic [LIFT_AW-1:0] lift_addr = '0;
  logic [AW-1:0] ra_addr, rb_addr, wa_addr, wb_addr, e_ra, e_rb, e_wa, e_wb;
  sample_t ra_data, rb_data, wa_data, wb_data, e_wad, e_wbd;
  logic wa_en, wb_en, e_wae, e_wbe;
  logic [1:0] pf_addr;
  logic [NP-1:0][COEF_W-1:0] pf_data;
  logic [LIFT_AW-1:0] uf_addr;
  logic [NU-1:0][COEF_W-1:0] uf_data;
  logic stall_first, wait_second;

  // testbench access to the picture RAM while the engine is idle
  logic tb_we = 0;
  logic [AW-1:0] tb_addr = '0;
  sample_t tb_wdata = '0;
  logic pf_we = 0, uf_we = 0;
  logic [1:0] cf_bank = '0;
  logic [LIFT_AW-1:0] cf_addr = '0;
  logic [COEF_W-1:0] cf_data = '0;

  lifting_1d #(.N(NP), .NT(NU), .AW(AW), .LIFT_AW(LIFT_AW), .FIFO_DEPTH(FD)) dut (
    .clk, .rst_n, .start, .fw, .base, .stride, .len, .lift_addr, .busy, .done,
    .ra_addr(e_ra), .rb_addr(e_rb), .ra_data, .rb_data,
    .wa_en(e_wae), .wa_addr(e_wa), .wa_data(e_wad),
    .wb_en(e_wbe), .wb_addr(e_wb), .wb_data(e_wbd),
    .pf_addr, .pf_data, .uf_addr, .uf_data, .stall_first, .wait_second
  );

  always_comb begin
    wa_en = busy ? e_wae : tb_we;
    wa_addr = busy ? e_wa : tb_addr;
    wa_data = busy ? e_wad : tb_wdata;
    wb_en = busy & e_wbe; wb_addr = e_wb; wb_data = e_wbd;
    ra_addr = busy ? e_ra : tb_addr;
    rb_addr = e_rb;
  end

  picture_ram #(.WIDTH(16), .WORDS(WORDS)) u_ram (
    .sys_clk(clk), .ram_clk, .wa_en, .wa_addr, .wa_data, .wb_en, .wb_addr, .wb_data,
    .ra_addr, .rb_addr, .ra_data, .rb_data
  );
  filter_ram #(.BANKS(NP), .DEPTH(3), .WIDTH(COEF_W)) u_pf (
    .clk, .we(pf_we), .wr_bank(cf_bank), .wr_addr(2'(cf_addr)), .wr_data(cf_data),
    .rd_addr(pf_addr), .rd_data(pf_data)
  );
  filter_ram #(.BANKS(NU), .DEPTH(LDEPTH), .WIDTH(COEF_W)) u_uf (
    .clk, .we(uf_we), .wr_bank(cf_bank), .wr_addr(cf_addr), .wr_data(cf_data),
    .rd_addr(uf_addr), .rd_data(uf_data)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;
  int n_stall = 0, n_wait = 0;
  always @(posedge clk) begin
    if (stall_first) n_stall++;
    if (wait_second) n_wait++;
  end

  initial begin
    #(20 * 200000);
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

  dwt_model m;   // used as a flat memory of WORDS samples with one lifting table

  task automatic mem_write(int a, int v);
    @(negedge clk);
    tb_we = 1; tb_addr = AW'(a); tb_wdata = 16'(v);
    @(negedge clk) tb_we = 0;
  endtask

  task automatic mem_read(int a, output int v);
    @(negedge clk) tb_addr = AW'(a);
    @(negedge clk) v = int'(ra_data);
  endtask

  task automatic run_line(int b, int s, int l, int lb, bit f, output longint cyc);
    longint t0;
    @(negedge clk);
    start = 1; fw = f; base = AW'(b); stride = AW'(s); len = 16'(l); lift_addr = LIFT_AW'(lb);
    t0 = cycle;
    @(negedge clk) start = 0;
    @(posedge clk iff done);
    cyc = cycle - t0;
  endtask

  task automatic test_line(int b, int s, int l, int lb);
    int orig[], v;
    longint cyc;
    orig = new[l];
    for (int k = 0; k < l; k++) begin
      orig[k] = int'($urandom_range(255));
      m.pic[b + k * s] = orig[k];
      mem_write(b + k * s, orig[k]);
    end
    run_line(b, s, l, lb, 1, cyc);
    $display("line C=%0d stride=%0d: forward %0d cycles", l, s, cyc);
    m.predict_line(b, s, l, 1);
    m.update_line(b, s, l, lb, 1);
    for (int k = 0; k < l; k++) begin
      mem_read(b + k * s, v);
      check(v == m.pic[b + k * s], $sformatf("C=%0d fw sample %0d: %0d model %0d", l, k, v, m.pic[b + k * s]));
    end
    if (l >= 256) check(cyc <= l / 2 + 24, $sformatf("rate: %0d cycles for %0d samples", cyc, l));
    run_line(b, s, l, lb, 0, cyc);
    $display("line C=%0d stride=%0d: inverse %0d cycles", l, s, cyc);
    for (int k = 0; k < l; k++) begin
      mem_read(b + k * s, v);
      check(v == orig[k], $sformatf("C=%0d iv sample %0d: %0d orig %0d", l, k, v, orig[k]));
    end
  endtask

  initial begin
    m = new(WORDS, 1, NP, NU);
    m.lift = new[LDEPTH];
    foreach (m.lift[a]) m.lift[a] = new[NU];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r <= NP / 2; r++)
      for (int j = 0; j < NP; j++) begin
        @(negedge clk);
        pf_we = 1; cf_bank = 2'(j); cf_addr = LIFT_AW'(r); cf_data = COEF_W'(pred_coef(NP, r, j));
      end
    @(negedge clk) pf_we = 0;
    for (int a = 0; a < LDEPTH; a++)
      for (int j = 0; j < NU; j++) begin
        m.lift[a][j] = int'($urandom_range(16383)) - 8192;
        @(negedge clk);
        uf_we = 1; cf_bank = 2'(j); cf_addr = LIFT_AW'(a); cf_data = COEF_W'(m.lift[a][j]);
      end
    @(negedge clk) uf_we = 0;

    test_line(0, 1, 12, 0);       // the 12-sample example
    test_line(100, 1, 13, 20);    // odd length
    test_line(3, 7, 32, 40);      // strided, like a column
    test_line(0, 2, 9, 60);       // short odd line, stride 2
    test_line(0, 1, 300, 100);    // long line: rate check
    test_line(512, 1, 301, 0);    // long odd line
    $display("stall_first=%0d wait_second=%0d", n_stall, n_wait);
    check(n_stall > 0, "first stage held by a filling FIFO");
    check(n_wait > 0, "second stage waited for FIFO data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
