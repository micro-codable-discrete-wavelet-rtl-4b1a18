// predict_seq -- operation sequencer for the predict module on one line.
//
// For a line of C coefficients (lambdas at even, gammas at odd positions,
// nG = floor(C/2) gammas) it produces one operation per accepted cycle:
//   * FILL, N-1 operations: read lambda_0..lambda_N-2 into the window;
//   * CALC, one operation per gamma g = 0..nG-1: read gamma_g and, when the
//     window has to move, the next lambda in the same cycle.
// Boundary handling follows the polynomial lifting scheme: with
// noLeft = N/2-1 left-affected gammas, noMiddle = nG-N+1+odd(C) unaffected
// gammas and the rest right-affected, gamma g uses the window starting at
// lambda s(g) and filter row r(g):
//     left   g <  noLeft            : s = 0,            r = g+1
//     middle noLeft <= g < noLeft+noMiddle : s = g-noLeft, r = N/2
//     right  otherwise              : s = noMiddle-1,   r = N/2+1+(g-noLeft-noMiddle)
// Filter row r counts the lambdas to the left of the gamma.  The current
// operation is presented on op_* while op_valid is high and is consumed in
// a cycle where advance is high.  busy stays high until the last operation
// has been consumed.  The line needs noMiddle >= 1, which every line of a
// correctly sized decomposition has.
module predict_seq #(
  parameter int N  = 4,
  parameter int LW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] len,
  input  logic          advance,
  output logic          op_valid,
  output logic          op_shift,
  output logic          op_calc,
  output logic [LW-1:0] op_lam_idx,
  output logic [LW-1:0] op_gam_idx,
  output logic [LW-1:0] op_row
);
  localparam logic [LW-1:0] NOLEFT = LW'(N / 2 - 1);
  localparam logic [LW-1:0] HALF   = LW'(N / 2);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_CALC} state_e;
  state_e        state;
  logic [LW-1:0] n_gam, n_mid, cnt, next_lam;

  logic [LW-1:0] s_g;
  always_comb begin
    op_valid   = (state != S_IDLE);
    op_shift   = 1'b0;
    op_calc    = 1'b0;
    op_lam_idx = next_lam;
    op_gam_idx = cnt;
    op_row     = '0;
    s_g        = '0;
    if (state == S_FILL) begin
      op_shift = 1'b1;
    end else if (state == S_CALC) begin
      op_calc = 1'b1;
      if (cnt < NOLEFT) begin
        s_g    = '0;
        op_row = cnt + 1'b1;
      end else if (cnt < NOLEFT + n_mid) begin
        s_g    = cnt - NOLEFT;
        op_row = HALF;
      end else begin
        s_g    = n_mid - 1'b1;
        op_row = HALF + 1'b1 + (cnt - NOLEFT - n_mid);
      end
      op_shift = (s_g + LW'(N - 1)) >= next_lam;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      n_gam    <= '0;
      n_mid    <= '0;
      cnt      <= '0;
      next_lam <= '0;
    end else if (start) begin
      n_gam    <= len >> 1;
      n_mid    <= (len >> 1) - LW'(N) + 1'b1 + LW'(len[0]);
      cnt      <= '0;
      next_lam <= '0;
      state    <= (N > 1) ? S_FILL : S_CALC;
    end else if (advance && op_valid) begin
      if (op_shift) next_lam <= next_lam + 1'b1;
      if (state == S_FILL) begin
        if (cnt == LW'(N - 2)) begin
          cnt   <= '0;
          state <= S_CALC;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else begin
        if (cnt == n_gam - 1'b1) state <= S_IDLE;
        cnt <= cnt + 1'b1;
      end
    end
  end

  a_middle: assert property (@(posedge clk) disable iff (!rst_n)
                             (state == S_CALC) |-> (n_mid >= 1));
endmodule
