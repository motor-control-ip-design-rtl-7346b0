// mc_pkg: widths, rates and types shared by the motor-control blocks.
//
// The numbers follow the controller's specification: 8 MHz system clock,
// encoder sampled at 1 MHz (system clock / 8), position latched every 1 ms,
// 33-bit position counter (counts up to 8,589,934,591 = 2^33-1), 32-bit
// distance/velocity/acceleration words, 10-bit PWM and 10-bit compensator
// input and output, 16-bit compensator coefficients.
// The quadrature state encoding is the four-state table of the x4 decoder.
package mc_pkg;

  localparam int unsigned SYS_CLK_HZ = 8_000_000;
  localparam int unsigned SAMPLE_RATE_HZ = 1_000_000;                  // encoder sampling
  localparam int unsigned IRQ_RATE_HZ    = 1_000;                      // 1 ms latch interval
  localparam int unsigned SAMPLE_DIV = SYS_CLK_HZ / SAMPLE_RATE_HZ;   // 8
  localparam int unsigned IRQ_PERIOD = SYS_CLK_HZ / IRQ_RATE_HZ;      // 8000
  localparam int unsigned CNT_W      = 33;          // position counter
  localparam int unsigned DATA_W     = 32;          // d, v, a words
  localparam int unsigned X_W        = 10;          // compensator input
  localparam int unsigned C_W        = 16;          // compensator coefficient
  localparam int unsigned Y_W        = 10;          // compensator output
  localparam int unsigned PWM_W      = 10;          // PWM resolution
  localparam int unsigned DEST_W     = 10;          // destination speed

  // Quadrature states: (A,B) = 10 -> S1, 11 -> S2, 01 -> S3, 00 -> S4.
  // Counting up walks S1 -> S2 -> S3 -> S4 -> S1, counting down the reverse.
  typedef enum logic [1:0] {
    QS1 = 2'd0,
    QS2 = 2'd1,
    QS3 = 2'd2,
    QS4 = 2'd3
  } qstate_t;

  function automatic qstate_t ab_to_state(input logic a, input logic b);
    unique case ({a, b})
      2'b10:   return QS1;
      2'b11:   return QS2;
      2'b01:   return QS3;
      default: return QS4;
    endcase
  endfunction

endpackage
