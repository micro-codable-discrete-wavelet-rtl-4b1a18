// update_seq -- operation sequencer for the update module on one line.
//
// For a line of C coefficients (nG = floor(C/2) gammas, nL = C-nG lambdas)
// it produces, one per accepted cycle:
//   * FILL,  NT operations: gamma forced to zero, shift lambda_0..NT-1 in;
//   * CALC,  one operation per gamma g = 0..nG-1, updating the window that
//     starts at lambda s(g) (same boundary rule as the predict side, with
//     noLeft = NT/2-1 and noMiddle = nG-NT+1+odd(C)).  The window moves on
//     (shift, next_lambda = 1) only when the next gamma's window starts one
//     lambda further; the lambda leaving on the left is then final and is
//     written out, and lambda s(g)+NT is taken in.  Otherwise the results
//     stay in place;
//   * EMPTY, NT operations: gamma forced to zero, shift the last window out,
//     every value final.
// op_wr_idx is the lambda index whose final value leaves the module in a
// writing operation; lambdas are written in order 0..nL-1, each once.
// op_gam_idx also selects the lifting coefficients of gamma g.  The operation
// on op_* is consumed in a cycle where advance is high.
module update_seq #(
  parameter int NT = 4,
  parameter int LW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] len,
  input  logic          advance,
  output logic          op_valid,
  output logic          op_next_lambda,
  output logic          op_gam_zero,
  output logic          op_need_lam,
  output logic          op_write,
  output logic [LW-1:0] op_lam_idx,
  output logic [LW-1:0] op_gam_idx,
  output logic [LW-1:0] op_wr_idx
);
  localparam logic [LW-1:0] NOLEFT = LW'(NT / 2 - 1);

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_CALC, S_EMPTY} state_e;
  state_e        state;
  logic [LW-1:0] n_gam, n_mid, cnt;

  logic [LW-1:0] s_g;
  always_comb begin
    op_valid       = (state != S_IDLE);
    op_next_lambda = 1'b1;
    op_gam_zero    = 1'b1;
    op_need_lam    = 1'b0;
    op_write       = 1'b0;
    op_lam_idx     = cnt;
    op_gam_idx     = cnt;
    op_wr_idx      = '0;
    s_g            = '0;
    if (cnt < NOLEFT)              s_g = '0;
    else if (cnt < NOLEFT + n_mid) s_g = cnt - NOLEFT;
    else                           s_g = n_mid - 1'b1;
    unique case (state)
      S_FILL: begin
        op_need_lam = 1'b1;
      end
      S_CALC: begin
        op_gam_zero    = 1'b0;
        op_next_lambda = (cnt >= NOLEFT) && (cnt + 1'b1 < NOLEFT + n_mid);
        op_need_lam    = op_next_lambda;
        op_write       = op_next_lambda;
        op_lam_idx     = s_g + LW'(NT);
        op_wr_idx      = s_g;
      end
      S_EMPTY: begin
        op_write  = 1'b1;
        op_wr_idx = n_mid - 1'b1 + cnt;
      end
      default: op_next_lambda = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n_gam <= '0;
      n_mid <= '0;
      cnt   <= '0;
    end else if (start) begin
      n_gam <= len >> 1;
      n_mid <= (len >> 1) - LW'(NT) + 1'b1 + LW'(len[0]);
      cnt   <= '0;
      state <= S_FILL;
    end else if (advance && op_valid) begin
      unique case (state)
        S_FILL:
          if (cnt == LW'(NT - 1)) begin cnt <= '0; state <= S_CALC; end
          else cnt <= cnt + 1'b1;
        S_CALC:
          if (cnt == n_gam - 1'b1) begin cnt <= '0; state <= S_EMPTY; end
          else cnt <= cnt + 1'b1;
        S_EMPTY:
          if (cnt == LW'(NT - 1)) begin cnt <= '0; state <= S_IDLE; end
          else cnt <= cnt + 1'b1;
        default: ;
      endcase
    end
  end

  a_middle: assert property (@(posedge clk) disable iff (!rst_n)
                             (state == S_CALC) |-> (n_mid >= 1));
endmodule
