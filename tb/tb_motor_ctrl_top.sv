// tb_motor_ctrl_top: end-to-end closed-loop run of the controller at its
// default parameters (8 MHz clock, 1 MHz encoder sampling, 1 ms interrupt)
// against the behavioural motor/encoder model.
//
// Profile: destination speeds 50, 100, 200 and 400 counts/ms forward, then
// 100 counts/ms in reverse, then 0. Noise spikes are injected on phase A
// during the forward segments and a clear_cnt is issued once.
// Checked:
//   - at every interrupt, act_v against the model's steps in the last 1 ms
//     (within 2 counts, 8 right after a reversal: the filter delays edges by
//     a few microseconds) and
//     act_d against the model's position (within 3 counts), and act_a against
//     the difference of the two previous velocities;
//   - at the end of each segment the measured speed in the commanded
//     direction is within 2 % (at least 3 counts) of the destination;
//   - each time the motor stands still, act_d equals the model position exactly;
//   - the interrupt period is exactly 8000 clocks;
//   - each mechanism occurred: noise spikes, up counts, down counts,
//     interrupts, clear, direction change, a compensator output above 700.
module tb_motor_ctrl_top;
  logic clk = 1'b0, rst = 1'b1, clear_cnt = 1'b0, dir_in = 1'b1;
  logic [9:0] dest_v = '0;
  logic cha, chb, pwm_out, dir_out, irq;
  logic signed [31:0] act_d, act_v, act_a;
  logic glitch_en = 1'b0;
  int speed, glitches, steps_last;
  longint pos;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  motor_ctrl_top dut (
    .clk, .rst, .cha, .chb, .clear_cnt, .dest_v, .dir_in,
    .pwm_out, .dir_out, .act_d, .act_v, .act_a, .irq_qep(irq)
  );

  motor_model motor (
    .clk, .pwm(pwm_out), .dir(dir_out), .glitch_en, .cha, .chb,
    .speed, .pos, .glitches, .steps_last
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_up = 0, n_dn = 0, n_irq = 0, n_clear = 0, n_dirsw = 0, n_hi_duty = 0;
  longint pos_offset = 0;
  logic dir_q = 1'b1;
  logic signed [31:0] v1 = 0, v2 = 0;
  int last_irq = 0, cyc = 0;
  bit track = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u3_quaddec.up) n_up++;
    if (dut.u3_quaddec.dn) n_dn++;
    if (dir_out != dir_q) n_dirsw++;
    dir_q <= dir_out;
    if (dut.y > 10'd700) n_hi_duty++;
  end

  // per-interrupt checks: outputs settle on the clock after irq_qep
  // around a reversal the filter delay shifts forward and backward steps
  // across the sample boundary, so the velocity tolerance widens there
  int vtol = 2, rev_age = 100;
  always @(posedge clk) begin
    if (dir_out != dir_q) rev_age = 0;
    else if (irq && rev_age < 100) rev_age++;
    vtol = (rev_age < 2) ? 8 : 2;
  end

  always @(posedge clk) begin
    if (irq && !rst) begin
      n_irq++;
      if (n_irq > 1) chk(cyc - last_irq == 8000, $sformatf("irq period %0d", cyc - last_irq));
      last_irq = cyc;
      #1;
      @(posedge clk); #1;
      if (track) begin
        chk(act_v - steps_last <= vtol && act_v - steps_last >= -vtol,
            $sformatf("act_v=%0d model steps=%0d", act_v, steps_last));
        chk(longint'(act_d) - (pos - pos_offset) <= 3 && longint'(act_d) - (pos - pos_offset) >= -3,
            $sformatf("act_d=%0d model=%0d", act_d, pos - pos_offset));
        chk(act_a == v1 - v2, $sformatf("act_a=%0d exp %0d", act_a, v1 - v2));
      end
      v2 = v1;
      v1 = act_v;
    end
  end

  task automatic run_ms(input int ms);
    repeat (ms * 8000) @(posedge clk);
  endtask

  task automatic segment(input int dest, input bit dir, input int ms);
    int vdir;
    dest_v = 10'(dest);
    dir_in = dir;
    run_ms(ms);
    @(posedge irq); @(posedge clk); @(posedge clk); #1;
    vdir = dir ? act_v : -act_v;
    chk(vdir - dest <= ((dest / 50 > 3) ? dest / 50 : 3) && dest - vdir <= ((dest / 50 > 3) ? dest / 50 : 3),
        $sformatf("segment dest=%0d dir=%0b settled at %0d", dest, dir, vdir));
    $display("segment dest=%0d dir=%0b: v=%0d d=%0d a=%0d duty=%0d", dest, dir, act_v, act_d, act_a, dut.y);
  endtask

  task automatic stop_and_check();
    dest_v = '0;
    run_ms(60);
    chk(speed == 0, $sformatf("motor stopped, speed %0d", speed));
    run_ms(3);
    chk(longint'(act_d) == pos - pos_offset, $sformatf("position at rest %0d, model %0d", act_d, pos - pos_offset));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    glitch_en = 1'b1;
    track = 1'b1;
    segment(50, 1'b1, 40);
    segment(100, 1'b1, 40);
    segment(200, 1'b1, 40);
    segment(400, 1'b1, 60);
    segment(100, 1'b0, 80);
    glitch_en = 1'b0;
    stop_and_check();
    glitch_en = 1'b1;
    // clear_cnt with the motor at rest: position restarts from zero
    @(posedge clk);
    track = 1'b0;
    clear_cnt <= 1'b1;
    @(posedge clk);
    clear_cnt <= 1'b0;
    #1;
    pos_offset = pos;
    v1 = 0; v2 = 0;
    n_irq = 0;   // the interval restarts at the clear
    n_clear++;
    chk(act_d == 0 && act_v == 0 && act_a == 0, "clear_cnt zeroes the outputs");
    @(posedge irq); @(posedge clk); @(posedge clk);
    track = 1'b1;
    glitch_en = 1'b1;
    segment(150, 1'b1, 40);
    glitch_en = 1'b0;
    stop_and_check();
    $display("mechanisms: spikes=%0d up=%0d down=%0d irq=%0d clear=%0d dir_switch=%0d high_duty_clocks=%0d",
             glitches, n_up, n_dn, n_irq, n_clear, n_dirsw, n_hi_duty);
    chk(glitches > 0, "noise spikes injected");
    chk(n_up > 0, "up counts");
    chk(n_dn > 0, "down counts");
    chk(n_irq > 100, "interrupts");
    chk(n_clear > 0, "clear");
    chk(n_dirsw > 0, "direction change");
    chk(n_hi_duty > 0, "high duty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
