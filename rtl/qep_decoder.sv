// qep_decoder: x4 quadrature decoder.
//
// The filtered phases (a, b) are mapped to one of four states,
// (1,0) -> S1, (1,1) -> S2, (0,1) -> S3, (0,0) -> S4. On every sampling
// enable the new state is compared with the stored one: one step forward
// (S1->S2->S3->S4->S1) is a count up, one step back a count down, so every
// edge of either phase counts (four counts per encoder line). The state table
// and the direction of counting follow the controller's specification; a
// jump of two states (both phases changed between samples) is ignored, which
// is this design's choice.
// Outputs: cnt together with up or dn, each a pulse of exactly one system
// clock, issued on the cycle after the sampling enable that saw the step.
// Synchronous active-high reset sets the state to S4 (both phases low, the
// filter's reset value) and clears the pulses.
module qep_decoder
  import mc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic sample_en,
  input  logic a,
  input  logic b,
  output logic cnt,
  output logic up,
  output logic dn
);

  qstate_t state, nstate;

  always_comb nstate = ab_to_state(a, b);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= QS4;
      cnt   <= 1'b0;
      up    <= 1'b0;
      dn    <= 1'b0;
    end else begin
      cnt <= 1'b0;
      up  <= 1'b0;
      dn  <= 1'b0;
      if (sample_en) begin
        state <= nstate;
        if (nstate == qstate_t'(state + 2'd1)) begin
          cnt <= 1'b1;
          up  <= 1'b1;
        end else if (nstate == qstate_t'(state - 2'd1)) begin
          cnt <= 1'b1;
          dn  <= 1'b1;
        end
      end
    end
  end

  // a count pulse always carries exactly one direction
  assert property (@(posedge clk) disable iff (rst) cnt |-> (up ^ dn));
  assert property (@(posedge clk) disable iff (rst) !cnt |-> !(up || dn));

endmodule
