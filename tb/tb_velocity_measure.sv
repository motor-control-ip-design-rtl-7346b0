// tb_velocity_measure: open-loop speed measurement at the four reference
// speeds 50, 100, 200 and 400 counts/ms, forward and reverse, at the
// controller's default parameters.
//
// The encoder phases are driven directly with exactly one quadrature step
// every 8000/V system clocks, so every 1 ms sample must contain exactly V
// counts. After two settling samples per speed the testbench checks at each
// interrupt that act_v equals +V (or -V in reverse), that act_d advances by
// exactly V per sample and that act_a is zero; across a step from 400 to
// 100 counts/ms the acceleration samples must add up to exactly -300.
module tb_velocity_measure;
  logic clk = 1'b0, rst = 1'b1;
  logic cha = 1'b0, chb = 1'b0;
  logic pwm_out, dir_out, irq;
  logic signed [31:0] act_d, act_v, act_a;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  motor_ctrl_top dut (
    .clk, .rst, .cha, .chb, .clear_cnt(1'b0), .dest_v(10'd0), .dir_in(1'b1),
    .pwm_out, .dir_out, .act_d, .act_v, .act_a, .irq_qep(irq)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encoder stimulus: one step every 'period' clocks in direction 'fwd'
  int period = 0;
  bit fwd = 1'b1;
  int phase = 3, tick = 0;
  logic [1:0] seq [4] = '{2'b10, 2'b11, 2'b01, 2'b00};
  always @(posedge clk) begin
    if (period > 0) begin
      tick++;
      if (tick >= period) begin
        tick = 0;
        phase = fwd ? (phase + 1) % 4 : (phase + 3) % 4;
      end
    end
    {cha, chb} <= seq[phase];
  end

  task automatic run_speed(input int v, input bit forward, input int samples);
    int prev_d, exp_v;
    period = 8000 / v;
    fwd = forward;
    exp_v = forward ? v : -v;
    repeat (2) @(posedge irq);
    @(posedge clk); @(posedge clk); #1;
    prev_d = act_d;
    for (int k = 0; k < samples; k++) begin
      @(posedge irq); @(posedge clk); @(posedge clk); #1;
      chk(act_v == exp_v, $sformatf("V=%0d: act_v=%0d", exp_v, act_v));
      chk(act_d - prev_d == exp_v, $sformatf("V=%0d: act_d step %0d", exp_v, act_d - prev_d));
      if (k >= 1) chk(act_a == 0, $sformatf("V=%0d: act_a=%0d", exp_v, act_a));
      prev_d = act_d;
    end
    $display("V=%0d: act_d=%0d act_v=%0d act_a=%0d", exp_v, act_d, act_v, act_a);
  endtask

  initial begin
    int speeds[4] = '{50, 100, 200, 400};
    int accel_seen = 0, accel_sum = 0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    foreach (speeds[i]) run_speed(speeds[i], 1'b1, 10);
    // a step from 400 to 100 counts/ms: the acceleration samples that follow
    // (one sample behind velocity) must add up to exactly -300
    period = 80;
    for (int k = 0; k < 4; k++) begin
      @(posedge irq); @(posedge clk); @(posedge clk); #1;
      accel_sum += act_a;
      if (act_a != 0) accel_seen++;
    end
    chk(accel_sum == -300 && accel_seen > 0, $sformatf("deceleration sum %0d", accel_sum));
    foreach (speeds[i]) run_speed(speeds[i], 1'b0, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
