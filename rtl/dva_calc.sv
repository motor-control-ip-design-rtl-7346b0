// dva_calc: distance, velocity and acceleration by the fixed-sampling-period
// method.
//
// On each sampling strobe (the 1 ms interrupt in the top level):
//   d <= din                      distance = latched position
//   v <= din - d                  v(k) = x(k) - x(k-1), T = one sample
//   a <= v - v_prev               acceleration, one sample behind v
// so with a steadily accelerating input 0, 2, 6, 12, 20 the outputs are
// v = 2, 4, 6, 8 and a = 0, 2, 2, 2. The difference method is the
// specification's (equation v(k) = {x(k) - x(k-1)}/T); the one-sample lag of
// a matches the controller's reference simulation; the strobe input is this
// design's addition.
// Differences are formed at CNT_W bits and the results kept at DATA_W bits,
// two's complement. clear zeroes all history; so does synchronous reset.
module dva_calc #(
  parameter int unsigned CNT_W  = 33,
  parameter int unsigned DATA_W = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     sample,
  input  logic        [CNT_W-1:0]  din,
  output logic signed [DATA_W-1:0] d,
  output logic signed [DATA_W-1:0] v,
  output logic signed [DATA_W-1:0] a
);

  logic        [CNT_W-1:0]  x_prev;
  logic signed [DATA_W-1:0] v_prev;
  logic signed [DATA_W-1:0] dx;

  always_comb dx = DATA_W'(din - x_prev);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      x_prev <= '0;
      v_prev <= '0;
      d      <= '0;
      v      <= '0;
      a      <= '0;
    end else if (sample) begin
      x_prev <= din;
      d      <= DATA_W'(din);
      v      <= dx;
      v_prev <= v;
      a      <= v - v_prev;
    end
  end

endmodule
