// motor_ctrl_top: closed-loop DC motor velocity controller.
//
// Signal path, all in the system clock domain (8 MHz by default):
//   cha/chb -> digital_filter -> qep_decoder -> counter_reg   (encoder, 1 MHz
//   sampling enable from clk_divider) -> qep_latch (count latched and irq_qep
//   pulsed every 1 ms) -> dva_calc (distance, velocity, acceleration per
//   sample) -> subt (dest_v minus measured speed) -> pid_compensator (one
//   update per 1 ms) -> pwm_timer (10-bit PWM, ~8 kHz, and direction).
// The block set, their order and the top-level pins (clear_cnt, dir_in,
// dest_v, pwm_out, dir_out, act_d, act_v, act_a) follow the controller's
// specification and block diagram. This design's choices: the 1 MHz rate is
// a clock enable, not a second clock; the measured velocity enters the
// subtractor signed by the commanded direction (v when dir_in = 1, -v
// otherwise), so the loop regulates speed magnitude in the commanded
// direction; irq_qep is also brought out as a pin.
// Units: dest_v and act_v are encoder counts (x4) per 1 ms sample; act_d is
// the position count at the last sample; act_a the change of act_v per sample.
// Timing: act_* change one clock after irq_qep; the PWM duty follows two
// clocks later and takes effect at the next PWM period start.
// Reset: synchronous, active high. clear_cnt zeroes position, latch, DVA
// history and error and restarts the 1 ms timer (the compensator keeps its
// output).
module motor_ctrl_top
  import mc_pkg::*;
#(
  parameter int unsigned        SAMPLE_DIV_P = SAMPLE_DIV,
  parameter int unsigned        IRQ_PERIOD_P = IRQ_PERIOD,
  parameter logic signed [15:0] C0 = 16'sd384,
  parameter logic signed [15:0] C1 = -16'sd256,
  parameter logic signed [15:0] C2 = 16'sd0,
  parameter int unsigned        S_SHIFT = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     cha,
  input  logic                     chb,
  input  logic                     clear_cnt,
  input  logic        [DEST_W-1:0] dest_v,
  input  logic                     dir_in,
  output logic                     pwm_out,
  output logic                     dir_out,
  output logic signed [DATA_W-1:0] act_d,
  output logic signed [DATA_W-1:0] act_v,
  output logic signed [DATA_W-1:0] act_a,
  output logic                     irq_qep
);

  logic             ce_1m;
  logic             cha_f, chb_f;
  logic             q_cnt, q_up, q_dn;
  logic [CNT_W-1:0] pos, pos_latched;
  logic signed [DATA_W-1:0] v_dir;
  logic signed [X_W-1:0]    err;
  logic        [Y_W-1:0]    y;

  clk_divider #(.DIV(SAMPLE_DIV_P)) u1_clkdiv (
    .clk, .rst, .ce_out(ce_1m)
  );

  digital_filter #(.TAPS(3)) u2_filt (
    .clk, .rst, .sample_en(ce_1m), .cha, .chb, .cha_f, .chb_f
  );

  qep_decoder u3_quaddec (
    .clk, .rst, .sample_en(ce_1m), .a(cha_f), .b(chb_f),
    .cnt(q_cnt), .up(q_up), .dn(q_dn)
  );

  counter_reg #(.CNT_W(CNT_W)) u4_cnt (
    .clk, .rst, .clear(clear_cnt), .cnt(q_cnt), .up(q_up), .dn(q_dn),
    .count(pos)
  );

  qep_latch #(.CNT_W(CNT_W), .PERIOD(IRQ_PERIOD_P)) u5_irqgen (
    .clk, .rst, .clear_cnt, .din(pos), .dout(pos_latched), .irq_qep
  );

  dva_calc #(.CNT_W(CNT_W), .DATA_W(DATA_W)) u6_dvagen (
    .clk, .rst, .clear(clear_cnt), .sample(irq_qep), .din(pos_latched),
    .d(act_d), .v(act_v), .a(act_a)
  );

  always_comb v_dir = dir_in ? act_v : -act_v;

  subt #(.ACT_W(DATA_W), .DEST_W(DEST_W), .ERR_W(X_W)) u8_subt (
    .clk, .rst, .clear_cnt, .act(v_dir), .dest(dest_v), .err
  );

  // the error register settles one clock after the DVA outputs, so the
  // compensator samples on the interrupt delayed by two clocks
  logic [1:0] irq_dly;
  always_ff @(posedge clk) begin
    if (rst) irq_dly <= '0;
    else     irq_dly <= {irq_dly[0], irq_qep};
  end

  pid_compensator #(
    .X_W(X_W), .C_W(C_W), .Y_W(Y_W),
    .C0(C0), .C1(C1), .C2(C2), .S_SHIFT(S_SHIFT)
  ) u9_compensator (
    .clk, .rst, .en(irq_dly[1]), .x_in(err), .y_out(y)
  );

  pwm_timer #(.PWM_W(PWM_W)) u7_pwmgen (
    .clk, .rst, .data_value(y), .sign_in(dir_in), .pwm(pwm_out),
    .sign_out(dir_out)
  );

endmodule
