// tb_qep_decoder: random walk of the encoder phases through the four
// quadrature states (forward, backward, hold, and illegal two-state jumps),
// sampled every 8 clocks. For every sample the expected pulse is derived from
// the phase values themselves: forward order 10 -> 11 -> 01 -> 00 -> 10 gives
// cnt+up, the reverse gives cnt+dn, anything else no pulse. Pulses must be
// exactly one clock wide and come on the clock after the sampling enable.
module tb_qep_decoder;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic a = 1'b0, b = 1'b0, cnt, up, dn;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  qep_decoder dut (.clk, .rst, .sample_en(en), .a, .b, .cnt, .up, .dn);

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

  // position along the forward cycle of a phase pair
  function automatic int pos_of(input logic pa, input logic pb);
    case ({pa, pb})
      2'b10: return 0;
      2'b11: return 1;
      2'b01: return 2;
      default: return 3;
    endcase
  endfunction

  initial begin
    logic [1:0] seq [4] = '{2'b10, 2'b11, 2'b01, 2'b00};
    int p = 3, np, d, ups = 0, dns = 0, jumps = 0;
    bit exp_up, exp_dn;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 5000; s++) begin
      case ($urandom_range(9, 0))
        0, 1, 2, 3: np = (p + 1) % 4;
        4, 5, 6:    np = (p + 3) % 4;
        7, 8:       np = p;
        default:    np = (p + 2) % 4;
      endcase
      {a, b} = seq[np];
      d = (pos_of(a, b) - p + 4) % 4;
      exp_up = (d == 1);
      exp_dn = (d == 3);
      if (d == 2) jumps++;
      p = np;
      @(posedge clk);
      en <= 1'b1;
      @(posedge clk);
      en <= 1'b0;
      #1;
      chk(cnt == (exp_up | exp_dn) && up == exp_up && dn == exp_dn,
          $sformatf("sample %0d: cnt=%b up=%b dn=%b exp up=%b dn=%b", s, cnt, up, dn, exp_up, exp_dn));
      if (exp_up) ups++;
      if (exp_dn) dns++;
      repeat (6) begin
        @(posedge clk); #1;
        chk(!cnt && !up && !dn, "pulse longer than one clock");
      end
    end
    chk(ups > 1000 && dns > 1000 && jumps > 100, "walk covered up, down and jumps");
    $display("ups=%0d dns=%0d jumps=%0d", ups, dns, jumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
