// tb_subt: random destination speeds (0..1023) and signed measured velocities
// (small, large and extreme) against err = clamp(dest - act, -512, 511); the
// result must appear one clock later. Also checks clear_cnt.
module tb_subt;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0;
  logic signed [31:0] act = '0;
  logic [9:0] dest = '0;
  logic signed [9:0] err;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  subt dut (.clk, .rst, .clear_cnt(clr), .act, .dest, .err);

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
    int sat_hi = 0, sat_lo = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 20000; i++) begin
      longint e;
      dest <= 10'($urandom_range(1023, 0));
      case ($urandom_range(3, 0))
        0: act <= 32'($urandom_range(900, 0)) - 32'sd450;
        1: act <= 32'($urandom_range(3000, 0)) - 32'sd1500;
        2: act <= $signed($urandom());
        default: act <= ($urandom_range(1, 0) != 0) ? 32'sh7FFF_FFFF : 32'sh8000_0000;
      endcase
      @(posedge clk); #1;
      @(posedge clk); #1;
      e = longint'(dest) - longint'(act);
      if (e > 511) begin e = 511; sat_hi++; end
      if (e < -512) begin e = -512; sat_lo++; end
      chk(err == 10'(e), $sformatf("dest=%0d act=%0d err=%0d exp %0d", dest, act, err, e));
    end
    clr <= 1'b1;
    @(posedge clk); #1;
    chk(err == 0, "clear_cnt");
    clr <= 1'b0;
    chk(sat_hi > 0 && sat_lo > 0, "both saturation limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
