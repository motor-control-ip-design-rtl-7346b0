// tb_qep_latch: with the default 8000-cycle period (1 ms at 8 MHz) checks that
// irq_qep is a one-clock pulse every 8000 clocks, that dout takes the count
// present on the latching edge and holds between pulses, and that clear_cnt
// zeroes dout and restarts the interval. The input count walks down like the
// reference simulation (0, -1, -3, -6, ...).
module tb_qep_latch;
  localparam int W = 33, PERIOD = 8000;
  logic clk = 1'b0, rst = 1'b1, clear_cnt = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic irq;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  qep_latch dut (.clk, .rst, .clear_cnt, .din, .dout, .irq_qep(irq));

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

  initial begin
    int cyc = 0, last = 0, irqs = 0, step = 0;
    bit cleared = 0;
    logic [W-1:0] held = '0, din_at_edge;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    while (irqs < 12) begin
      din_at_edge = din;
      @(posedge clk); #1;
      cyc++;
      // a new count every 1000 cycles
      if (cyc % 1000 == 0) begin step++; din = din - W'(step); end
      if (irq) begin
        irqs++;
        chk(cyc - last == PERIOD, $sformatf("irq interval %0d", cyc - last));
        chk(dout == din_at_edge, $sformatf("latched %0d exp %0d", $signed(dout), $signed(din_at_edge)));
        held = dout;
        last = cyc;
      end else begin
        chk(dout == held, "dout changed between interrupts");
      end
      if (irqs == 6 && !cleared && cyc - last == 3000) begin
        cleared = 1;
        clear_cnt <= 1'b1;
        @(posedge clk); #1;
        cyc++;
        clear_cnt <= 1'b0;
        chk(dout == '0 && !irq, "clear_cnt zeroes dout");
        held = '0;
        last = cyc;   // interval restarts at the clear
      end
    end
    chk($signed(held) < 0, "negative counts latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
