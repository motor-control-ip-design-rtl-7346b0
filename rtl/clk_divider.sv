// clk_divider: divides the system clock by DIV and emits the result as a
// one-cycle clock-enable pulse (ce_out), every DIV cycles.
//
// With the default DIV = 8 and an 8 MHz system clock this is the 1 MHz
// encoder sampling rate used by the noise filter and the quadrature decoder.
// The divide ratio is the specification's; producing an enable instead of a
// derived clock keeps the whole controller in one clock domain, which is a
// choice of this design.
// Timing: after reset ce_out first goes high DIV cycles later, then every DIV
// cycles. Reset is synchronous and active high.
module clk_divider #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,
  input  logic rst,
  output logic ce_out
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;
  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      ce_out <= 1'b0;
    end else if (cnt == W'(DIV - 1)) begin
      cnt    <= '0;
      ce_out <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      ce_out <= 1'b0;
    end
  end

endmodule
