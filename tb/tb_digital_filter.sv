// tb_digital_filter: drives both channels with random levels held for 1 to 6
// samples (so many 1- and 2-sample spikes) and compares the filtered outputs
// sample by sample with a reference: after sample n the output becomes L when
// the raw samples n-2, n-3 and n-4 all equal L, and holds otherwise. Also
// checks that no spike shorter than three samples ever reaches an output and
// that sampling only happens on the enable (enable every 8 clocks).
module tb_digital_filter;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic cha = 1'b0, chb = 1'b0, cha_f, chb_f;
  int checks = 0, failures = 0;
  always #62.5ns clk = ~clk;

  digital_filter dut (.clk, .rst, .sample_en(en), .cha, .chb, .cha_f, .chb_f);

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

  logic xa[$], xb[$];
  logic ea, eb;

  function automatic logic ref_next(input logic prev, ref logic h[$]);
    int n = h.size();
    if (n < 5) return prev;
    if (h[n-3] && h[n-4] && h[n-5]) return 1'b1;
    if (!h[n-3] && !h[n-4] && !h[n-5]) return 1'b0;
    return prev;
  endfunction

  initial begin
    int hold_a = 0, hold_b = 0, spikes = 0, changes = 0;
    logic pa, pb;
    // reset history: both channels read 0 in every stage
    repeat (5) begin xa.push_back(1'b0); xb.push_back(1'b0); end
    ea = 1'b0; eb = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 4000; s++) begin
      // choose the level present at this sample
      if (hold_a == 0) begin cha <= $urandom_range(1, 0); hold_a = $urandom_range(6, 1); if (hold_a < 3) spikes++; end
      if (hold_b == 0) begin chb <= $urandom_range(1, 0); hold_b = $urandom_range(6, 1); end
      hold_a--; hold_b--;
      repeat (7) @(posedge clk);
      en <= 1'b1;
      @(posedge clk);
      xa.push_back(cha); xb.push_back(chb);
      en <= 1'b0;
      #1;
      pa = ea; pb = eb;
      ea = ref_next(ea, xa);
      eb = ref_next(eb, xb);
      if (ea != pa) changes++;
      chk(cha_f == ea, $sformatf("A sample %0d: got %b exp %b", s, cha_f, ea));
      chk(chb_f == eb, $sformatf("B sample %0d: got %b exp %b", s, chb_f, eb));
      // outputs must not move between enables
      @(posedge clk); #1;
      chk(cha_f == ea && chb_f == eb, "output moved without enable");
      if (xa.size() > 16) begin void'(xa.pop_front()); void'(xb.pop_front()); end
    end
    chk(spikes > 100 && changes > 100, "stimulus exercised spikes and edges");
    $display("spikes=%0d output_changes=%0d", spikes, changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
