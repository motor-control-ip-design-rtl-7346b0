// tb_pwm_timer: for a set of duty words (including 0, 1, 400, 800 and 1023)
// measures every PWM period: it must be 1024 clocks long, high for exactly
// data_value clocks, starting high, and sign_out must follow sign_in. A duty
// word changed in mid-period must only take effect at the next period.
module tb_pwm_timer;
  logic clk = 1'b0, rst = 1'b1, sign_in = 1'b0;
  logic [9:0] data_value = '0;
  logic pwm, sign_out;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  pwm_timer dut (.clk, .rst, .data_value, .sign_in, .pwm, .sign_out);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int duties[12] = '{800, 400, 0, 1, 1023, 512, 2, 1022, 100, 777, 333, 800};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // the first edge after reset release is a period start
    for (int k = 0; k < 12; k++) begin
      automatic int highs = 0, first_low = -1;
      data_value <= 10'(duties[k]);
      sign_in    <= k[0];
      // the value is captured at the period start, which is the next edge
      for (int c = 0; c < 1024; c++) begin
        @(posedge clk); #1;
        if (c == 500) data_value <= 10'($urandom());   // must not matter
        if (pwm) begin
          highs++;
          chk(first_low < 0, "high after low inside one period");
        end else if (first_low < 0) first_low = c;
        if (c == 2) chk(sign_out == k[0], "sign_out follows sign_in");
      end
      chk(highs == duties[k], $sformatf("duty %0d: %0d high clocks", duties[k], highs));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
