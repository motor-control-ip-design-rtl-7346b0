// tb_pid_compensator: two coefficient sets, the default PI setting and a full
// PID setting with a derivative term, driven with random errors and checked
// update by update against an integer model of
//   y[n] = clamp(y[n-1] + clamp((C0 x[n] + C1 x[n-1] + C2 x[n-2]) >> S, -512, 511), 0, 1023).
// Also checks that y holds between strobes and that both output limits occur.
module tb_pid_compensator;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [9:0] x = '0;
  logic [9:0] y_pi, y_pid;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  pid_compensator dut_pi (.clk, .rst, .en, .x_in(x), .y_out(y_pi));
  pid_compensator #(.C0(16'sd1200), .C1(-16'sd1900), .C2(16'sd800), .S_SHIFT(6))
    dut_pid (.clk, .rst, .en, .x_in(x), .y_out(y_pid));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clampl(input longint v, input longint lo, input longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic longint floor_div(input longint v, input int sh);
    longint dv = longint'(1) << sh;
    longint q = v / dv;
    if ((v % dv != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction

  initial begin
    longint m1 [2] = '{0, 0}, m2 [2] = '{0, 0}, my [2] = '{0, 0};
    longint c0 [2] = '{384, 1200}, c1 [2] = '{-256, -1900}, c2 [2] = '{0, 800};
    int sh [2] = '{8, 6};
    int top_hits = 0, zero_hits = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 5000; i++) begin
      // error phases: large positive, large negative, small
      automatic int ph = (i / 200) % 3;
      if (ph == 0)      x <= 10'($urandom_range(511, 100));
      else if (ph == 1) x <= -10'($urandom_range(512, 100));
      else              x <= 10'($urandom_range(40, 0)) - 10'sd20;
      @(posedge clk);
      en <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
      #1;
      for (int k = 0; k < 2; k++) begin
        automatic longint s = c0[k] * longint'(x) + c1[k] * m1[k] + c2[k] * m2[k];
        automatic longint st = clampl(floor_div(s, sh[k]), -512, 511);
        my[k] = clampl(my[k] + st, 0, 1023);
        m2[k] = m1[k];
        m1[k] = longint'(x);
      end
      chk(y_pi == 10'(my[0]), $sformatf("PI  step %0d: y=%0d exp %0d", i, y_pi, my[0]));
      chk(y_pid == 10'(my[1]), $sformatf("PID step %0d: y=%0d exp %0d", i, y_pid, my[1]));
      if (my[0] == 1023 || my[1] == 1023) top_hits++;
      if (my[0] == 0 || my[1] == 0) zero_hits++;
      repeat (3) @(posedge clk);
      #1;
      chk(y_pi == 10'(my[0]) && y_pid == 10'(my[1]), "output moved without strobe");
    end
    chk(top_hits > 0 && zero_hits > 0, "both output limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
