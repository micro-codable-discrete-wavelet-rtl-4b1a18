// dwt_control -- control unit of the 2-D transform.
//
// Turns a forward or inverse transform request into a sequence of 1-D line
// commands for the lifting engine.  The picture is WIDTH x HEIGHT samples
// stored row by row.  The number of levels is nX = floor(log2((WIDTH-1)/
// (Nmax-1))) along the rows and nY likewise along the columns, Nmax =
// max(N, NT); n = max(nX, nY).
//   forward: for level = 0..n-1: the rows pass (if level < nX), then the
//            columns pass (if level < nY);
//   inverse: exactly the reverse: for level = n-1..0: columns, then rows.
// A pass at a level with step = 2^level processes every step-th row (or
// column) starting at 0; a row line starts at y*WIDTH with stride step and
// holds ceil(WIDTH/step) coefficients, a column line starts at x with stride
// WIDTH*step and holds ceil(HEIGHT/step) coefficients.  Each line is started
// with a one-cycle line_start and the next one only after line_done, so a
// line never reads data an earlier line has still to write.
// line_lift is the lifting-coefficient base for (direction, level), see
// dwt_pkg::lift_base.  start (while idle) takes fw; busy covers the whole
// transform and done pulses once at its end.  pass_level / pass_cols show the
// pass in progress.  Iteration order and line geometry follow the described
// 2-D algorithm; the one-line-at-a-time handshake is this design's choice.
module dwt_control
  import dwt_pkg::*;
#(
  parameter int WIDTH   = 64,
  parameter int HEIGHT  = 32,
  parameter int N       = 4,
  parameter int NT      = 4,
  parameter int AW      = $clog2(WIDTH * HEIGHT),
  parameter int LW      = 16,
  parameter int LIFT_AW = $clog2(lift_depth(WIDTH, HEIGHT, max2(N, NT)) + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               fw,
  output logic               busy,
  output logic               done,
  output logic               line_start,
  output logic               line_fw,
  output logic [AW-1:0]      line_base,
  output logic [AW-1:0]      line_stride,
  output logic [LW-1:0]      line_len,
  output logic [LIFT_AW-1:0] line_lift,
  input  logic               line_done,
  output logic [3:0]         pass_level,
  output logic               pass_cols
);
  localparam int NMAX = max2(N, NT);
  localparam int NX   = num_levels(WIDTH, NMAX);
  localparam int NY   = num_levels(HEIGHT, NMAX);
  localparam int NL   = max2(NX, NY);
  localparam int PW   = $clog2(2 * NL + 1);

  typedef enum logic [2:0] {S_IDLE, S_PASS, S_LINE, S_WAIT, S_NEXT} state_e;
  state_e        state;
  logic          fw_q;
  logic [PW-1:0] pass;          // pass counter 0 .. 2*NL-1
  logic [LW-1:0] line;          // current row (y) or column (x)
  logic [3:0]    level;
  logic          cols;

  // Level and direction of the pass being executed.
  always_comb begin
    logic [PW-1:0] q;
    q     = fw_q ? pass : PW'(2 * NL - 1) - pass;
    level = 4'(q >> 1);
    cols  = q[0];
  end
  assign pass_level = level;
  assign pass_cols  = cols;

  logic pass_on;
  assign pass_on = cols ? (int'(level) < NY) : (int'(level) < NX);

  logic [LW-1:0] step, lines_in_pass;
  assign step          = LW'(1) << level;
  assign lines_in_pass = cols ? LW'(WIDTH) : LW'(HEIGHT);

  always_comb begin
    line_fw     = fw_q;
    line_lift   = LIFT_AW'(lift_base(cols, int'(level), WIDTH, HEIGHT, NMAX));
    if (cols) begin
      line_base   = AW'(line);
      line_stride = AW'(WIDTH) << level;
      line_len    = (LW'(HEIGHT) + step - 1'b1) >> level;
    end else begin
      line_base   = AW'(line * LW'(WIDTH));
      line_stride = AW'(step);
      line_len    = (LW'(WIDTH) + step - 1'b1) >> level;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      fw_q       <= 1'b1;
      pass       <= '0;
      line       <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      line_start <= 1'b0;
    end else begin
      done       <= 1'b0;
      line_start <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start) begin
            fw_q  <= fw;
            pass  <= '0;
            line  <= '0;
            busy  <= 1'b1;
            state <= S_PASS;
          end
        S_PASS:
          if (int'(pass) == 2 * NL) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (pass_on) begin
            line  <= '0;
            state <= S_LINE;
          end else begin
            pass  <= pass + 1'b1;
          end
        S_LINE: begin
          line_start <= 1'b1;
          state      <= S_WAIT;
        end
        S_WAIT:
          if (line_done) state <= S_NEXT;
        S_NEXT:
          if (line + step >= lines_in_pass) begin
            pass  <= pass + 1'b1;
            state <= S_PASS;
          end else begin
            line  <= line + step;
            state <= S_LINE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
