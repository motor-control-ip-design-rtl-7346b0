// digital_filter: noise filter for the two encoder phases.
//
// Each channel is sampled into an input flip-flop and shifted through a
// TAPS-deep shift register (default 3). The output flip-flop works like a J-K
// flip-flop: it is set when every tap holds 1 and cleared when every tap holds
// 0, and otherwise keeps its value. A spike shorter than TAPS samples
// therefore never reaches the output, and a clean edge reaches it TAPS+1
// samples after it is first sampled.
// The structure (input flop, three-stage shift register, J-K output flop)
// follows the encoder filter specified for the controller; running it on a
// sampling enable (the 1 MHz encoder rate in the top level) is a choice of
// this design.
// Interface: cha/chb raw phases, cha_f/chb_f filtered phases; everything
// advances only when sample_en is high. Synchronous active-high reset clears
// all stages and outputs to 0.
module digital_filter #(
  parameter int unsigned TAPS = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic sample_en,
  input  logic cha,
  input  logic chb,
  output logic cha_f,
  output logic chb_f
);

  logic            in_a, in_b;
  logic [TAPS-1:0] sh_a, sh_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_a  <= 1'b0;
      in_b  <= 1'b0;
      sh_a  <= '0;
      sh_b  <= '0;
      cha_f <= 1'b0;
      chb_f <= 1'b0;
    end else if (sample_en) begin
      in_a <= cha;
      in_b <= chb;
      sh_a <= {sh_a[TAPS-2:0], in_a};
      sh_b <= {sh_b[TAPS-2:0], in_b};
      // J-K behaviour: J = all ones, K = all zeros
      if (&sh_a)       cha_f <= 1'b1;
      else if (~|sh_a) cha_f <= 1'b0;
      if (&sh_b)       chb_f <= 1'b1;
      else if (~|sh_b) chb_f <= 1'b0;
    end
  end

endmodule
