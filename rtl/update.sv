// update -- update (primal lifting) module.
//
// Holds a window of NT (N-tilde) lambdas in registers lambda_0..lambda_NT-1,
// each followed by an adder.  In a cycle with enable set, one gamma updates
// all NT lambdas at once:
//     u_j   = (gamma_in * L_j + 2^(US-1)) >>> US
//     out_j = lambda_j + u_j   (forward, fw = 1)
//     out_j = lambda_j - u_j   (inverse, fw = 0)
// The control input next_lambda selects where the adder outputs go:
//   * next_lambda = 0  (in-place): out_j goes back into lambda_j;
//   * next_lambda = 1  (shift):    out_j+1 goes into lambda_j, lam_in into
//     lambda_NT-1, and out_0 leaves the module on lam_out.
// With gamma_in forced to zero by the caller, next_lambda = 1 becomes the
// fill configuration (loading a fresh window from lam_in) and the empty
// configuration (draining the window to lam_out).  lam_out is registered;
// lam_out_valid is raised one cycle after a shifting cycle whose out_0 is a
// final value (write_out = 1), so fill cycles produce no output.
// Coefficients are 18-bit with US fractional bits, tap 0 the leftmost lambda.
// Results wrap to the 16-bit sample width, which keeps the forward and the
// inverse update exactly inverse.  The four configurations, the 2^-US
// scaling and the FW/IV add/subtract follow the described module; the
// write_out qualifier is this design's addition.
module update
  import dwt_pkg::*;
#(
  parameter int NT = 4,
  parameter int US = UPD_SCALE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      enable,
  input  logic                      next_lambda,
  input  logic                      write_out,
  input  logic                      fw,
  input  sample_t                   lam_in,
  input  sample_t                   gam_in,
  input  logic [NT-1:0][COEF_W-1:0] coef,
  output sample_t                   lam_out,
  output logic                      lam_out_valid
);
  localparam int PW = DATA_W + COEF_W;

  sample_t lam_q [NT];
  sample_t sum   [NT];

  logic signed [PW-1:0] prod [NT];
  for (genvar j = 0; j < NT; j++) begin : g_mul
    coef_multiplier #(.A_W(DATA_W), .B_W(COEF_W)) u_mul (
      .a(gam_in), .b(coef[j]), .p(prod[j])
    );
  end

  always_comb
    for (int j = 0; j < NT; j++) begin
      if (fw) sum[j] = sample_t'(lam_q[j] + sample_t'((prod[j] + PW'(1 << (US - 1))) >>> US));
      else    sum[j] = sample_t'(lam_q[j] - sample_t'((prod[j] + PW'(1 << (US - 1))) >>> US));
    end

  always_ff @(posedge clk)
    if (enable) begin
      if (next_lambda) begin
        for (int j = 0; j < NT - 1; j++) lam_q[j] <= sum[j+1];
        lam_q[NT-1] <= lam_in;
      end else begin
        for (int j = 0; j < NT; j++) lam_q[j] <= sum[j];
      end
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lam_out       <= '0;
      lam_out_valid <= 1'b0;
    end else begin
      lam_out_valid <= enable && next_lambda && write_out;
      if (enable && next_lambda) lam_out <= sum[0];
    end
  end
endmodule
