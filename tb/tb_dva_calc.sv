// tb_dva_calc: first the reference sequence din = 0, 2, 6, 12, 20, 30, 42,
// 56, 72, 90, 110 (constant acceleration), for which velocity must read
// 2, 4, 6, ... 20 and acceleration 0, 2, 2, ...; then random positions of both
// signs against a model of v(k) = x(k) - x(k-1), a(k) = v(k-1) - v(k-2);
// then clear. Outputs may only change on a sample strobe.
module tb_dva_calc;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, sample = 1'b0;
  logic [32:0] din = '0;
  logic signed [31:0] d, v, a;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  dva_calc dut (.clk, .rst, .clear, .sample, .din, .d, .v, .a);

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

  longint xp = 0, vp = 0, vpp = 0;

  task automatic strobe(input longint x);
    longint ve, ae;
    din <= 33'(x);
    repeat (3) @(posedge clk);
    sample <= 1'b1;
    @(posedge clk);
    sample <= 1'b0;
    #1;
    ve = x - xp;
    ae = vp - vpp;
    chk(d == 32'(x), $sformatf("d=%0d exp %0d", d, x));
    chk(v == 32'(ve), $sformatf("v=%0d exp %0d", v, ve));
    chk(a == 32'(ae), $sformatf("a=%0d exp %0d", a, ae));
    vpp = vp; vp = ve; xp = x;
  endtask

  initial begin
    int ref_v[10] = '{2, 4, 6, 8, 10, 12, 14, 16, 18, 20};
    int ref_a[10] = '{0, 2, 2, 2, 2, 2, 2, 2, 2, 2};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    strobe(0);
    for (int k = 1; k <= 10; k++) begin
      strobe(k * (k + 1));
      chk(v == ref_v[k-1] && a == ref_a[k-1], $sformatf("reference row %0d: v=%0d a=%0d", k, v, a));
    end
    for (int i = 0; i < 2000; i++) begin
      automatic longint x = xp + longint'($urandom_range(800, 0)) - 400;
      strobe(x);
    end
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    #1;
    chk(d == 0 && v == 0 && a == 0, "clear");
    xp = 0; vp = 0; vpp = 0;
    for (int i = 0; i < 50; i++) strobe(-longint'(i * i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
