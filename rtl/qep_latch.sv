// qep_latch: 1 ms interval timer, count latch and interrupt generator.
//
// A timer counts PERIOD system clocks (default 8000, i.e. 1 ms at 8 MHz).
// On the last cycle of each period the position count din is copied to dout
// and irq_qep is high for exactly one clock; downstream blocks use that pulse
// as their sampling strobe. The 1 ms interval follows the specification;
// making clear_cnt restart the timer and zero dout is this design's choice.
// Timing: the first pulse comes PERIOD cycles after reset or clear_cnt, then
// one every PERIOD cycles; dout and irq_qep change on the same edge.
// Synchronous active-high reset.
module qep_latch #(
  parameter int unsigned CNT_W  = 33,
  parameter int unsigned PERIOD = 8000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear_cnt,
  input  logic [CNT_W-1:0] din,
  output logic [CNT_W-1:0] dout,
  output logic             irq_qep
);

  localparam int unsigned TW = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  logic [TW-1:0] timer;

  always_ff @(posedge clk) begin
    if (rst || clear_cnt) begin
      timer   <= '0;
      dout    <= '0;
      irq_qep <= 1'b0;
    end else if (timer == TW'(PERIOD - 1)) begin
      timer   <= '0;
      dout    <= din;
      irq_qep <= 1'b1;
    end else begin
      timer   <= timer + 1'b1;
      irq_qep <= 1'b0;
    end
  end

endmodule
