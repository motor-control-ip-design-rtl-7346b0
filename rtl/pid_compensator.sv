// pid_compensator: incremental digital PID filter.
//
//   y[n] = y[n-1] + ( C0*x[n] + C1*x[n-1] + C2*x[n-2] ) / S
//
// x is the signed 10-bit speed error, C0..C2 signed 16-bit coefficients that
// combine the proportional, integral and derivative gains (for gains Kp, Ki,
// Kd: C0 = Kp+Ki+Kd, C1 = -Kp-2Kd, C2 = Kd). Two delay registers hold x[n-1]
// and x[n-2]; three 10x16 multipliers give 26-bit products, which are summed,
// divided by S = 2^S_SHIFT (arithmetic shift) and saturated to a signed 10-bit
// step, then added to the previous output. The equation, the delay line and
// the 10/16/26-bit widths follow the specification. This design's choices:
// the sum is kept at 28 bits so it cannot overflow, S is a power of two, the
// default coefficients (a PI setting: Kp = 256, Ki = 128, S = 256) and the
// clamp of y to [0, 2^Y_W-1], since y is the PWM duty and the direction
// travels separately.
// Timing: one update per en pulse (the 1 ms interrupt in the top level); the
// new y_out is visible on the clock after en. Synchronous active-high reset
// clears the delay line and the output.
module pid_compensator #(
  parameter int unsigned       X_W     = 10,
  parameter int unsigned       C_W     = 16,
  parameter int unsigned       Y_W     = 10,
  parameter logic signed [15:0] C0     = 16'sd384,
  parameter logic signed [15:0] C1     = -16'sd256,
  parameter logic signed [15:0] C2     = 16'sd0,
  parameter int unsigned       S_SHIFT = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic signed [X_W-1:0] x_in,
  output logic        [Y_W-1:0] y_out
);

  localparam int unsigned PW = X_W + C_W;      // product width, 26
  localparam int unsigned SW = PW + 2;         // sum of three products
  localparam int unsigned YW = Y_W + 2;        // y plus step, signed

  localparam logic signed [SW-1:0] STEP_MAX = SW'((1 << (Y_W - 1)) - 1);
  localparam logic signed [SW-1:0] STEP_MIN = -SW'(1 << (Y_W - 1));
  localparam logic signed [YW-1:0] Y_MAX    = YW'((1 << Y_W) - 1);

  logic signed [X_W-1:0] x1, x2;
  logic signed [C_W-1:0] c0, c1, c2;
  logic signed [PW-1:0]  p0, p1, p2;
  logic signed [SW-1:0]  sum, scaled;
  logic signed [Y_W-1:0] step;
  logic signed [YW-1:0]  y_next;

  always_comb begin
    c0     = C_W'(C0);
    c1     = C_W'(C1);
    c2     = C_W'(C2);
    p0     = PW'(x_in) * PW'(c0);
    p1     = PW'(x1)   * PW'(c1);
    p2     = PW'(x2)   * PW'(c2);
    sum    = SW'(p0) + SW'(p1) + SW'(p2);
    scaled = sum >>> S_SHIFT;
    if (scaled > STEP_MAX)      step = STEP_MAX[Y_W-1:0];
    else if (scaled < STEP_MIN) step = STEP_MIN[Y_W-1:0];
    else                        step = scaled[Y_W-1:0];
    y_next = $signed({2'b00, y_out}) + YW'(step);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x1    <= '0;
      x2    <= '0;
      y_out <= '0;
    end else if (en) begin
      x1 <= x_in;
      x2 <= x1;
      if (y_next < 0)          y_out <= '0;
      else if (y_next > Y_MAX) y_out <= Y_MAX[Y_W-1:0];
      else                     y_out <= y_next[Y_W-1:0];
    end
  end

endmodule
