// pwm_timer: 10-bit pulse-width modulator with direction output.
//
// A free-running PWM_W-bit counter sets the period: 2^10 = 1024 system clocks,
// 8 MHz / 1024 ~ 7.8 kHz. At the start of every period the duty word
// data_value and the direction sign_in are captured; pwm is then high for the
// first data_value cycles of the period and low for the rest (0 gives a
// constant low, the maximum 1023 gives 1023 of 1024 cycles high). sign_out
// carries the captured direction to the motor driver. The 10-bit resolution
// and the period follow the specification; capturing once per period (so a
// change never shortens a pulse) and the high-first, edge-aligned shape are
// this design's choices.
// Synchronous active-high reset clears counter, duty and outputs.
module pwm_timer #(
  parameter int unsigned PWM_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [PWM_W-1:0] data_value,
  input  logic             sign_in,
  output logic             pwm,
  output logic             sign_out
);

  logic [PWM_W-1:0] cnt;
  logic [PWM_W-1:0] duty;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      duty     <= '0;
      sign_out <= 1'b0;
      pwm      <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '0) begin
        duty     <= data_value;
        sign_out <= sign_in;
        pwm      <= (data_value != '0);
      end else begin
        pwm <= (cnt < duty);
      end
    end
  end

endmodule
