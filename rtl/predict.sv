// predict -- predict (dual lifting) module.
//
// Computes one wavelet coefficient per cycle:
//     P     = (sum_j lambda_j * F_j + 2^(PS-1)) >>> PS
//     gamma = gamma_in - P   (forward, fw = 1)
//     gamma = gamma_in + P   (inverse, fw = 0)
// over a window of N neighbouring lambdas held in a pipeline of N
// registers.  The window is filled one lambda per cycle (shift = 1): every
// register takes the value of its right neighbour and the rightmost one
// takes lam_in, so only one new lambda has to be read per predicted gamma.
// For the boundary-affected gammas the window is left in place (shift = 0)
// and only the coefficient row and gamma_in change.
//
// Operation in a cycle with calc = 1 uses the window as it is after this
// cycle's shift, i.e. the rightmost tap sees lam_in directly when shift is
// set, so a shift and a prediction can happen in the same cycle.  The
// filter coefficients F_j (18-bit, PS fractional bits) arrive on coef[j],
// tap 0 being the leftmost lambda.  The products are kept at full width, so
// the only rounding is the final scaling (add 2^(PS-1), arithmetic shift); the result wraps to the
// 16-bit sample width, which keeps forward and inverse exactly inverse.
// gamma_out is registered: it is valid (gam_out_valid) one cycle after the
// calc cycle.  The N-register window, the 2^-PS scaling and the FW/IV
// add/subtract follow the described module; taking the newly shifted lambda
// straight into the tap in the same cycle is this design's choice.
module predict
  import dwt_pkg::*;
#(
  parameter int N  = 4,
  parameter int PS = PRED_SCALE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      shift,
  input  logic                      calc,
  input  logic                      fw,
  input  sample_t                   lam_in,
  input  sample_t                   gam_in,
  input  logic [N-1:0][COEF_W-1:0]  coef,
  output sample_t                   gam_out,
  output logic                      gam_out_valid
);
  localparam int PW = DATA_W + COEF_W;
  localparam int SW = PW + $clog2(N) + 1;

  sample_t lam_q [N];
  sample_t win   [N];

  always_comb begin
    for (int j = 0; j < N; j++) win[j] = lam_q[j];
    if (shift) begin
      for (int j = 0; j < N - 1; j++) win[j] = lam_q[j+1];
      win[N-1] = lam_in;
    end
  end

  logic signed [PW-1:0] prod [N];
  for (genvar j = 0; j < N; j++) begin : g_mul
    coef_multiplier #(.A_W(DATA_W), .B_W(COEF_W)) u_mul (
      .a(win[j]), .b(coef[j]), .p(prod[j])
    );
  end

  logic signed [SW-1:0] acc;
  sample_t              pred;
  always_comb begin
    acc = '0;
    for (int j = 0; j < N; j++) acc += SW'(prod[j]);
    pred = sample_t'((acc + SW'(1 << (PS - 1))) >>> PS);
  end

  always_ff @(posedge clk)
    if (shift) for (int j = 0; j < N; j++) lam_q[j] <= win[j];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gam_out       <= '0;
      gam_out_valid <= 1'b0;
    end else begin
      gam_out_valid <= calc;
      if (calc) gam_out <= fw ? sample_t'(gam_in - pred) : sample_t'(gam_in + pred);
    end
  end
endmodule
