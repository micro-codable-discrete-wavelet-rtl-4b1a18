// lifting_1d -- one-dimensional lifting engine: predict and update running
// concurrently on one line of the picture, with the lambda FIFO and the
// gamma FIFO between them.
//
// A line is the set of C coefficients base + k*stride, k = 0..C-1 (lambdas
// at even k, gammas at odd k).  One of the two lifting modules is the first
// stage and takes both of its inputs from the picture RAM; the other one is
// the second stage and takes its inputs from the two FIFOs:
//   forward (fw = 1): predict first.  The lambdas it reads also go into the
//     lambda FIFO and its gamma outputs into the gamma FIFO; update reads
//     both FIFOs.  Predict writes gammas, update writes lambdas.
//   inverse (fw = 0): update first.  The gammas it reads also go into the
//     gamma FIFO and its lambda outputs into the lambda FIFO; predict reads
//     both FIFOs.
// Each stage is driven by its sequencer (predict_seq, update_seq).  An
// operation is issued in cycle t: picture RAM read addresses and filter RAM
// addresses are presented, and FIFO words are popped into registers.  It is
// executed by the lifting module in cycle t+1, when the RAM data is there;
// the module result is registered and written to the picture RAM in t+2.
// The first stage holds while either FIFO holds DEPTH-4 words or more, so
// words still in flight always find room; the second stage waits while a
// FIFO it needs is empty.  The update module's gamma input is forced to zero
// in its fill and empty operations.
//
// Picture RAM use per cycle: read A = lambda, read B = gamma (first stage),
// write A = predicted gamma, write B = updated lambda.  The predict filter RAM
// stores only rows 0..N/2; rows above N/2 are read from row N-r with the taps
// reversed, since those rows are mirror images.  The lifting coefficients of
// gamma g are at lift_addr + g.  start (one cycle, while idle) loads the line
// parameters; done pulses in the cycle after the line's last RAM write.
// stall_first / wait_second report the two flow-control holds.
module lifting_1d
  import dwt_pkg::*;
#(
  parameter int N          = 4,
  parameter int NT         = 4,
  parameter int AW         = 11,
  parameter int LW         = 16,
  parameter int LIFT_AW    = 7,
  parameter int FIFO_DEPTH = 2 * (N + NT),
  localparam int PF_DEPTH  = N / 2 + 1,
  localparam int PF_AW     = $clog2(PF_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // line command
  input  logic                      start,
  input  logic                      fw,
  input  logic [AW-1:0]             base,
  input  logic [AW-1:0]             stride,
  input  logic [LW-1:0]             len,
  input  logic [LIFT_AW-1:0]        lift_addr,
  output logic                      busy,
  output logic                      done,
  // picture RAM
  output logic [AW-1:0]             ra_addr,
  output logic [AW-1:0]             rb_addr,
  input  sample_t                   ra_data,
  input  sample_t                   rb_data,
  output logic                      wa_en,
  output logic [AW-1:0]             wa_addr,
  output sample_t                   wa_data,
  output logic                      wb_en,
  output logic [AW-1:0]             wb_addr,
  output sample_t                   wb_data,
  // filter RAMs
  output logic [PF_AW-1:0]          pf_addr,
  input  logic [N-1:0][COEF_W-1:0]  pf_data,
  output logic [LIFT_AW-1:0]        uf_addr,
  input  logic [NT-1:0][COEF_W-1:0] uf_data,
  // flow-control status
  output logic                      stall_first,
  output logic                      wait_second
);
  localparam int FCW = $clog2(FIFO_DEPTH + 1);

  // ---------------------------------------------------------------- line
  logic          fw_q;
  logic [AW-1:0] base_q, stride_q;
  logic [LIFT_AW-1:0] lift_q;

  function automatic logic [AW-1:0] lam_addr(logic [LW-1:0] i);
    return base_q + AW'((AW + LW + 1)'({i, 1'b0}) * stride_q);
  endfunction
  function automatic logic [AW-1:0] gam_addr(logic [LW-1:0] g);
    return base_q + AW'((AW + LW + 1)'({g, 1'b1}) * stride_q);
  endfunction

  // ---------------------------------------------------------------- FIFOs
  logic          lf_push, lf_pop, lf_empty, lf_full;
  logic          gf_push, gf_pop, gf_empty, gf_full;
  sample_t       lf_wdata, lf_rdata, gf_wdata, gf_rdata;
  logic [FCW-1:0] lf_count, gf_count;

  data_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_lam_fifo (
    .clk, .rst_n, .clear(start), .push(lf_push), .wr_data(lf_wdata), .pop(lf_pop),
    .rd_data(lf_rdata), .empty(lf_empty), .full(lf_full), .count(lf_count)
  );
  data_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_gam_fifo (
    .clk, .rst_n, .clear(start), .push(gf_push), .wr_data(gf_wdata), .pop(gf_pop),
    .rd_data(gf_rdata), .empty(gf_empty), .full(gf_full), .count(gf_count)
  );

  logic fifo_high;
  assign fifo_high = (lf_count >= FCW'(FIFO_DEPTH - 4)) || (gf_count >= FCW'(FIFO_DEPTH - 4));

  // ---------------------------------------------------------- sequencers
  logic          p_valid, p_shift, p_calc, p_adv;
  logic [LW-1:0] p_lam_idx, p_gam_idx, p_row;
  logic          u_valid, u_next, u_gzero, u_need_lam, u_write, u_adv;
  logic [LW-1:0] u_lam_idx, u_gam_idx, u_wr_idx;

  predict_seq #(.N(N), .LW(LW)) u_pseq (
    .clk, .rst_n, .start, .len, .advance(p_adv),
    .op_valid(p_valid), .op_shift(p_shift), .op_calc(p_calc),
    .op_lam_idx(p_lam_idx), .op_gam_idx(p_gam_idx), .op_row(p_row)
  );
  update_seq #(.NT(NT), .LW(LW)) u_useq (
    .clk, .rst_n, .start, .len, .advance(u_adv),
    .op_valid(u_valid), .op_next_lambda(u_next), .op_gam_zero(u_gzero),
    .op_need_lam(u_need_lam), .op_write(u_write),
    .op_lam_idx(u_lam_idx), .op_gam_idx(u_gam_idx), .op_wr_idx(u_wr_idx)
  );

  // Issue conditions.  First stage: RAM always answers, hold on full FIFOs.
  // Second stage: needs its FIFO words present.
  logic p_ready, u_ready;
  always_comb begin
    p_ready = fw_q ? !fifo_high
                   : ((!p_shift || !lf_empty) && (!p_calc || !gf_empty));
    u_ready = fw_q ? ((!u_need_lam || !lf_empty) && (u_gzero || !gf_empty))
                   : !fifo_high;
    p_adv   = p_valid && p_ready;
    u_adv   = u_valid && u_ready;
    stall_first = fw_q ? (p_valid && fifo_high) : (u_valid && fifo_high);
    wait_second = fw_q ? (u_valid && !u_ready)  : (p_valid && !p_ready);
    lf_pop  = fw_q ? (u_adv && u_need_lam) : (p_adv && p_shift);
    gf_pop  = fw_q ? (u_adv && !u_gzero)   : (p_adv && p_calc);
  end

  // RAM read addresses (first stage) and filter addresses.
  always_comb begin
    ra_addr = fw_q ? lam_addr(p_lam_idx) : lam_addr(u_lam_idx);
    rb_addr = fw_q ? gam_addr(p_gam_idx) : gam_addr(u_gam_idx);
    pf_addr = (p_row > LW'(N / 2)) ? PF_AW'(LW'(N) - p_row) : PF_AW'(p_row);
    uf_addr = lift_q + LIFT_AW'(u_gam_idx);
  end

  // --------------------------------------------------- execute registers
  logic          pe_v, pe_shift, pe_calc, pe_mirror;
  logic [LW-1:0] pe_gidx, pw_gidx;
  sample_t       pe_lam, pe_gam;
  logic          ue_v, ue_next, ue_gzero, ue_write;
  logic [LW-1:0] ue_wr_idx, uw_idx;
  sample_t       ue_lam, ue_gam;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_v <= 1'b0;
      ue_v <= 1'b0;
    end else begin
      pe_v <= p_adv;
      ue_v <= u_adv;
    end
  end

  always_ff @(posedge clk) begin
    pe_shift  <= p_adv && p_shift;
    pe_calc   <= p_adv && p_calc;
    pe_mirror <= p_row > LW'(N / 2);
    pe_gidx   <= p_gam_idx;
    pw_gidx   <= pe_gidx;
    pe_lam    <= lf_rdata;
    pe_gam    <= gf_rdata;
    ue_next   <= u_next;
    ue_gzero  <= u_gzero;
    ue_write  <= u_write;
    ue_wr_idx <= u_wr_idx;
    uw_idx    <= ue_wr_idx;
    ue_lam    <= lf_rdata;
    ue_gam    <= gf_rdata;
  end

  // ------------------------------------------------------------ datapath
  logic [N-1:0][COEF_W-1:0] p_coef;
  always_comb
    for (int j = 0; j < N; j++) p_coef[j] = pe_mirror ? pf_data[N-1-j] : pf_data[j];

  sample_t p_lam_in, p_gam_in, p_gam_out;
  logic    p_out_v;
  assign p_lam_in = fw_q ? ra_data : pe_lam;
  assign p_gam_in = fw_q ? rb_data : pe_gam;

  predict #(.N(N)) u_predict (
    .clk, .rst_n, .shift(pe_shift), .calc(pe_calc), .fw(fw_q),
    .lam_in(p_lam_in), .gam_in(p_gam_in), .coef(p_coef),
    .gam_out(p_gam_out), .gam_out_valid(p_out_v)
  );

  sample_t u_lam_in, u_gam_in, u_lam_out;
  logic    u_out_v;
  assign u_lam_in = fw_q ? ue_lam : ra_data;
  // zero-gamma multiplexer in front of the update module
  assign u_gam_in = ue_gzero ? '0 : (fw_q ? ue_gam : rb_data);

  update #(.NT(NT)) u_update (
    .clk, .rst_n, .enable(ue_v), .next_lambda(ue_next), .write_out(ue_write), .fw(fw_q),
    .lam_in(u_lam_in), .gam_in(u_gam_in), .coef(uf_data),
    .lam_out(u_lam_out), .lam_out_valid(u_out_v)
  );

  // FIFO input multiplexers
  always_comb begin
    lf_push  = fw_q ? pe_shift : u_out_v;
    lf_wdata = fw_q ? ra_data  : u_lam_out;
    gf_push  = fw_q ? p_out_v  : (ue_v && !ue_gzero);
    gf_wdata = fw_q ? p_gam_out : rb_data;
  end

  // Picture RAM writes
  always_comb begin
    wa_en   = p_out_v;
    wa_addr = gam_addr(pw_gidx);
    wa_data = p_gam_out;
    wb_en   = u_out_v;
    wb_addr = lam_addr(uw_idx);
    wb_data = u_lam_out;
  end

  // ------------------------------------------------------------- control
  logic line_idle;
  assign line_idle = !p_valid && !u_valid && !pe_v && !ue_v && !p_out_v && !u_out_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      fw_q     <= 1'b1;
      base_q   <= '0;
      stride_q <= '0;
      lift_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        fw_q     <= fw;
        base_q   <= base;
        stride_q <= stride;
        lift_q   <= lift_addr;
      end else if (busy && line_idle) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  // the DEPTH-4 hold threshold must keep both FIFOs from ever filling up
  a_lam_room:   assert property (@(posedge clk) disable iff (!rst_n) !lf_full);
  a_gam_room:   assert property (@(posedge clk) disable iff (!rst_n) !gf_full);
endmodule
