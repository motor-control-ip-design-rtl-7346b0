// counter_reg: up/down position counter.
//
// Adds one when a count pulse arrives with up, subtracts one when it arrives
// with dn. The register is CNT_W = 33 bits wide, enough for 8,589,934,591
// (2^33-1) pulses as the specification requires; it wraps modulo 2^CNT_W and
// is read as two's complement, so moving backwards from zero gives negative
// positions (wrap and sign reading are this design's choice).
// Interface: cnt/up/dn from the quadrature decoder, clear zeroes the count.
// Timing: count changes on the clock edge that samples the pulse.
// Synchronous active-high reset clears the count.
module counter_reg #(
  parameter int unsigned CNT_W = 33
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             cnt,
  input  logic             up,
  input  logic             dn,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst || clear)     count <= '0;
    else if (cnt && up)   count <= count + 1'b1;
    else if (cnt && dn)   count <= count - 1'b1;
  end

endmodule
