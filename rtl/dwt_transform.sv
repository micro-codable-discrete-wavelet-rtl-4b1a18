// dwt_transform -- lifting-scheme 2-D discrete wavelet transform unit.
//
// The whole picture (WIDTH x HEIGHT 16-bit samples, row-major) is held in an
// on-chip dual-port picture RAM.  A forward (fw = 1) or inverse (fw = 0)
// transform request makes the control unit run every level of the 2-D
// polynomial-lifting transform in place, one row or column at a time, on the
// 1-D lifting engine, where the predict and update modules work
// concurrently.  Predict uses an N-tap interpolating filter, update an
// NT-tap lifting filter; both sets of coefficients live in banked filter
// RAMs loaded through the coefficient port, so the same hardware runs any
// polynomial filter of these lengths.
//
// Interfaces (all on clk, the system clock):
//   * ram_clk: twice the frequency of clk, with one rising edge inside each
//     half of clk; it clocks only the picture RAM.
//   * start / fw / busy / done: start a transform while idle; busy stays
//     high until done pulses.
//   * external picture port, usable while idle: ext_we writes the two
//     samples ext_wdata[0], ext_wdata[1] to addresses 2*ext_addr and
//     2*ext_addr+1 through the two RAM ports; ext_rdata returns the pair
//     at 2*ext_raddr, 2*ext_raddr+1 one cycle after the address.
//   * coefficient port: coef_we writes coef_wdata into bank coef_bank, word
//     coef_addr, of the predict filter RAM (coef_sel = 0, N banks, rows
//     0..N/2 of the filter table) or of the update filter RAM (coef_sel = 1,
//     NT banks, one word per gamma, laid out as dwt_pkg::lift_base says).
//   * stall_first / wait_second: the 1-D engine's flow-control holds;
//     pass_level / pass_cols: the level and direction being processed.
// The multiplexers in front of the picture RAM give the external port the
// RAM while idle and the lifting engine while busy.  Defaults (64 x 32, N =
// NT = 4) are the configuration the hardware was implemented in.  The
// external pixel-pair port format and the idle-only access are this
// design's choices.
module dwt_transform
  import dwt_pkg::*;
#(
  parameter int WIDTH  = 64,
  parameter int HEIGHT = 32,
  parameter int N      = 4,
  parameter int NT     = 4,
  localparam int WORDS    = WIDTH * HEIGHT,
  localparam int AW       = $clog2(WORDS),
  localparam int LW       = 16,
  localparam int LDEPTH   = lift_depth(WIDTH, HEIGHT, max2(N, NT)),
  localparam int LIFT_AW  = $clog2(LDEPTH + 1),
  localparam int PF_DEPTH = N / 2 + 1,
  localparam int CAW      = (LIFT_AW > $clog2(PF_DEPTH)) ? LIFT_AW : $clog2(PF_DEPTH),
  localparam int CBW      = (N > NT) ? $clog2(N) : $clog2(NT)
) (
  input  logic                   clk,
  input  logic                   ram_clk,
  input  logic                   rst_n,
  // transform command
  input  logic                   start,
  input  logic                   fw,
  output logic                   busy,
  output logic                   done,
  // external picture port
  input  logic                   ext_we,
  input  logic [AW-2:0]          ext_addr,
  input  logic [1:0][DATA_W-1:0] ext_wdata,
  input  logic [AW-2:0]          ext_raddr,
  output logic [1:0][DATA_W-1:0] ext_rdata,
  // coefficient port
  input  logic                   coef_we,
  input  logic                   coef_sel,
  input  logic [CBW-1:0]         coef_bank,
  input  logic [CAW-1:0]         coef_addr,
  input  logic [COEF_W-1:0]      coef_wdata,
  // status
  output logic                   stall_first,
  output logic                   wait_second,
  output logic [3:0]             pass_level,
  output logic                   pass_cols
);
  // ------------------------------------------------------------ control
  logic               line_start, line_fw, line_done, line_busy;
  logic [AW-1:0]      line_base, line_stride;
  logic [LW-1:0]      line_len;
  logic [LIFT_AW-1:0] line_lift;

  dwt_control #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .N(N), .NT(NT),
                .AW(AW), .LW(LW), .LIFT_AW(LIFT_AW)) u_control (
    .clk, .rst_n, .start, .fw, .busy, .done,
    .line_start, .line_fw, .line_base, .line_stride, .line_len, .line_lift,
    .line_done, .pass_level, .pass_cols
  );

  // ------------------------------------------------------- filter RAMs
  localparam int PF_AW = $clog2(PF_DEPTH);
  logic [PF_AW-1:0]          pf_addr;
  logic [N-1:0][COEF_W-1:0]  pf_data;
  logic [LIFT_AW-1:0]        uf_addr;
  logic [NT-1:0][COEF_W-1:0] uf_data;

  filter_ram #(.BANKS(N), .DEPTH(PF_DEPTH), .WIDTH(COEF_W)) u_predict_filter (
    .clk, .we(coef_we && !coef_sel), .wr_bank($clog2(N)'(coef_bank)),
    .wr_addr(PF_AW'(coef_addr)), .wr_data(coef_wdata),
    .rd_addr(pf_addr), .rd_data(pf_data)
  );
  filter_ram #(.BANKS(NT), .DEPTH(LDEPTH), .WIDTH(COEF_W)) u_update_filter (
    .clk, .we(coef_we && coef_sel), .wr_bank($clog2(NT)'(coef_bank)),
    .wr_addr($clog2(LDEPTH)'(coef_addr)), .wr_data(coef_wdata),
    .rd_addr($clog2(LDEPTH)'(uf_addr)), .rd_data(uf_data)
  );

  // --------------------------------------------------------- 1-D engine
  logic [AW-1:0] e_ra_addr, e_rb_addr, e_wa_addr, e_wb_addr;
  logic          e_wa_en, e_wb_en;
  sample_t       e_wa_data, e_wb_data, ra_data, rb_data;

  lifting_1d #(.N(N), .NT(NT), .AW(AW), .LW(LW), .LIFT_AW(LIFT_AW)) u_engine (
    .clk, .rst_n,
    .start(line_start), .fw(line_fw), .base(line_base), .stride(line_stride),
    .len(line_len), .lift_addr(line_lift), .busy(line_busy), .done(line_done),
    .ra_addr(e_ra_addr), .rb_addr(e_rb_addr), .ra_data, .rb_data,
    .wa_en(e_wa_en), .wa_addr(e_wa_addr), .wa_data(e_wa_data),
    .wb_en(e_wb_en), .wb_addr(e_wb_addr), .wb_data(e_wb_data),
    .pf_addr, .pf_data, .uf_addr, .uf_data,
    .stall_first, .wait_second
  );

  // ------------------------------------------ picture RAM and its muxes
  logic          wa_en, wb_en;
  logic [AW-1:0] wa_addr, wb_addr, ra_addr, rb_addr;
  sample_t       wa_data, wb_data;

  always_comb begin
    if (busy) begin
      wa_en = e_wa_en;  wa_addr = e_wa_addr;  wa_data = e_wa_data;
      wb_en = e_wb_en;  wb_addr = e_wb_addr;  wb_data = e_wb_data;
      ra_addr = e_ra_addr;
      rb_addr = e_rb_addr;
    end else begin
      wa_en = ext_we;   wa_addr = {ext_addr, 1'b0};  wa_data = ext_wdata[0];
      wb_en = ext_we;   wb_addr = {ext_addr, 1'b1};  wb_data = ext_wdata[1];
      ra_addr = {ext_raddr, 1'b0};
      rb_addr = {ext_raddr, 1'b1};
    end
  end

  picture_ram #(.WIDTH(DATA_W), .WORDS(WORDS)) u_picture_ram (
    .sys_clk(clk), .ram_clk,
    .wa_en, .wa_addr, .wa_data(wa_data), .wb_en, .wb_addr, .wb_data(wb_data),
    .ra_addr, .rb_addr, .ra_data(ra_data), .rb_data(rb_data)
  );

  assign ext_rdata = {rb_data, ra_data};

  // The control unit only starts a line while the engine is idle.
  a_line_start: assert property (@(posedge clk) disable iff (!rst_n) line_start |-> !line_busy);
  a_ext_idle: assert property (@(posedge clk) disable iff (!rst_n) ext_we |-> !busy);
endmodule
