// tb_counter_reg: random count pulses in both directions against a 64-bit
// reference reduced modulo 2^33, including wrap below zero and clear.
module tb_counter_reg;
  localparam int W = 33;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, cnt = 1'b0, up = 1'b0, dn = 1'b0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  counter_reg dut (.clk, .rst, .clear, .cnt, .up, .dn, .count);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint model = 0;
    longint mask = (64'sd1 <<< W) - 1;
    int wraps = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    chk(count == '0, "reset value");
    // count down from zero: must read 2^33-1 (two's complement -1)
    cnt <= 1'b1; dn <= 1'b1; @(posedge clk); #1;
    cnt <= 1'b0; dn <= 1'b0;
    chk(count == 33'h1_FFFF_FFFF, $sformatf("wrap below zero: %h", count));
    cnt <= 1'b1; up <= 1'b1; @(posedge clk); #1;
    cnt <= 1'b0; up <= 1'b0;
    chk(count == '0, "wrap back to zero");
    for (int i = 0; i < 20000; i++) begin
      automatic int r = $urandom_range(99, 0);
      cnt   <= (r < 80);
      up    <= (r < 45) || (r >= 90 && r < 95);   // cnt=0 with up: no count
      dn    <= (r >= 45 && r < 80) || (r >= 95 && r < 99);   // likewise for dn
      clear <= (r == 99);
      @(posedge clk); #1;
      if (r == 99) model = 0;
      else if (r < 45) model = model + 1;
      else if (r < 80) model = model - 1;
      if (model < 0) wraps++;
      chk(count == W'(model & mask), $sformatf("step %0d: %0d vs %0d", i, count, model & mask));
    end
    chk(wraps > 0, "negative positions reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
