// tb_clk_divider: checks that the enable pulse is one clock wide and repeats
// exactly every DIV clocks, first DIV clocks after reset, for the default
// DIV = 8 (8 MHz -> 1 MHz).
module tb_clk_divider;
  logic clk = 1'b0, rst = 1'b1, ce;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  clk_divider dut (.clk, .rst, .ce_out(ce));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last, pulses;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    cyc = 0; last = 0; pulses = 0;
    while (pulses < 100) begin
      @(posedge clk); #1;
      cyc++;
      if (ce) begin
        chk(cyc - last == 8, $sformatf("interval %0d", cyc - last));
        last = cyc;
        pulses++;
      end
    end
    chk(pulses == 100, "pulse count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
