// motor_model: behavioural model of a DC motor with a quadrature encoder, for
// closed-loop simulation of the controller. Not synthesizable logic.
//
// Once per sample interval (SAMPLE_CLKS system clocks, 1 ms at 8 MHz) the
// model measures the PWM duty over the past interval and moves its speed a
// quarter of the way towards VMAX * duty (a first-order lag of about four
// samples). Speed is in encoder counts (x4 edges) per interval. A phase
// accumulator turns the speed into quadrature steps: every time it passes
// SAMPLE_CLKS one step is taken, forward (A leads) when dir = 1. The model
// keeps its own signed step count in pos. When glitch_en is set it also flips
// phase A for GLITCH_CLKS clocks at random moments (noise spikes) and counts
// them in glitches. Spikes are only placed where phase A has been steady for
// QUIET_CLKS clocks: a spike right after a real edge restarts the filter's
// three-sample wait, delaying that edge by up to five samples, and at high
// speed the delayed edge can then coincide with the next edge of phase B.
module motor_model #(
  parameter int SAMPLE_CLKS = 8000,
  parameter int VMAX        = 500,
  parameter int GLITCH_CLKS = 10,
  parameter int QUIET_CLKS  = 48
) (
  input  logic clk,
  input  logic pwm,
  input  logic dir,
  input  logic glitch_en,
  output logic cha,
  output logic chb,
  output int   speed,
  output longint pos,
  output int   glitches,
  output int   steps_last     // net signed steps in the last completed interval
);
  logic [1:0] seq [4] = '{2'b10, 2'b11, 2'b01, 2'b00};
  int phase = 3;
  int acc = 0, clks = 0, highs = 0, steps_now = 0;
  int glitch_left = 0;
  int target = 0;
  int since_a = 0;      // clocks since the last real edge of phase A
  logic ga = 1'b0;
  logic cha_real = 1'b0;

  initial begin
    speed = 0; pos = 0; glitches = 0; steps_last = 0;
  end

  always @(posedge clk) begin
    if (pwm) highs++;
    clks++;
    if (clks == SAMPLE_CLKS) begin
      target = int'((longint'(highs) * longint'(VMAX)) / longint'(SAMPLE_CLKS));
      speed = speed + (target - speed) / 4;
      if (target > speed && (target - speed) < 4) speed++;
      if (target < speed && (speed - target) < 4) speed--;
      steps_last = steps_now;
      steps_now = 0;
      clks = 0;
      highs = 0;
    end
    acc += speed;
    if (acc >= SAMPLE_CLKS) begin
      acc -= SAMPLE_CLKS;
      phase = dir ? (phase + 1) % 4 : (phase + 3) % 4;
      pos = dir ? pos + 1 : pos - 1;
      steps_now = dir ? steps_now + 1 : steps_now - 1;
    end
    if (seq[phase][1] != cha_real) since_a = 0;
    else if (since_a < 1_000_000) since_a++;
    cha_real = seq[phase][1];
    if (glitch_left > 0) begin
      glitch_left--;
      if (glitch_left == 0) ga = 1'b0;
    end else if (glitch_en && since_a >= QUIET_CLKS && $urandom_range(4999, 0) == 0) begin
      glitch_left = GLITCH_CLKS;
      ga = 1'b1;
      glitches++;
    end
    cha <= seq[phase][1] ^ ga;
    chb <= seq[phase][0];
  end
endmodule
