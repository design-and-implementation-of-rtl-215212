// qam16_pkg: types and constants shared by the QAM-16 modulator blocks.
//
// The carrier samples are 8-bit two's-complement values (-127..+127), the
// I and Q levels are 8-bit two's-complement constants (+-1, +-3), and their
// products are 16-bit two's-complement values. The default frequency code
// gives a 1 MHz carrier from a 50 MHz clock with a 32-bit phase accumulator:
// L = f * 2^32 / F_CLK = 85899346 (f = 999999.99 Hz, step 0.0116 Hz).
package qam16_pkg;

  typedef logic signed [7:0]  sample_t;   // carrier sample or I/Q level
  typedef logic signed [15:0] product_t;  // level * sample

  // Which table a waveform ROM holds.
  typedef enum logic {WAVE_SIN = 1'b0, WAVE_COS = 1'b1} wave_e;

  localparam int unsigned  ACC_WIDTH     = 32;
  localparam int unsigned  ROM_ADDR_W    = 13;
  localparam int unsigned  SAMPLE_WIDTH  = 8;
  localparam logic [31:0]  CODE_F_1MHZ   = 32'd85899346;
  localparam int unsigned  SUM_DIVISOR   = 5;
  localparam int unsigned  DAC_OFFSET    = 128;

  // Constellation levels formed by the constant block.
  localparam sample_t LEVEL_P3 = 8'sd3;
  localparam sample_t LEVEL_P1 = 8'sd1;
  localparam sample_t LEVEL_M1 = -8'sd1;
  localparam sample_t LEVEL_M3 = -8'sd3;

endpackage
