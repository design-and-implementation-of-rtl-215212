// qam16_modulator: digital QAM-16 modulator built around a quadrature DDS.
//
// Data path: the serial bit stream is grouped into 4-bit symbols by
// serial_to_parallel; the constant block maps symbol bits 1:0 to the I level
// and bits 3:2 to the Q level (+-1, +-3); the QDDFS produces signed sine and
// cosine carrier samples at f = CODE_F * F_CLK / 2^32 (1 MHz at 50 MHz by
// default); two signed multipliers form Q*sin and I*cos; the summation block
// computes (Q*sin + I*cos)/5 + 128. The low 8 bits of that result (qamk)
// are the offset-binary QAM-16 sample for the output DAC, sin_out is the
// carrier sine for the second DAC. The DACs and reconstruction filters are
// outside this module.
//
// Timing: the carrier outputs trail the phase accumulator by two clocks; the
// level path and the multiply/sum path are combinational, so qamk follows a
// new symbol in the same clock the symbol register changes (one clock after
// the last bit of the group is sampled). rst_n is active low and clears the
// phase accumulator and the symbol converter asynchronously; hold it for at
// least two clocks so the carrier pipeline is flushed.
// Wiring, widths and constants follow the source design; the serial input
// with a bit_valid strobe is this design's choice.
module qam16_modulator
  import qam16_pkg::*;
#(
  parameter logic [31:0] CODE_F    = CODE_F_1MHZ,
  parameter int unsigned SCALE_DIV = SUM_DIVISOR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bit_in,
  input  logic        bit_valid,
  output logic [3:0]  symbol,
  output logic        symbol_strobe,
  output sample_t     sin_out,
  output sample_t     cos_out,
  output product_t    qam_sum,
  output logic [7:0]  qamk
);

  sample_t  i_level, q_level;
  product_t q_sin, i_cos;

  serial_to_parallel #(.BITS(4)) u_sp (
    .clk           (clk),
    .rst_n         (rst_n),
    .bit_in        (bit_in),
    .bit_valid     (bit_valid),
    .symbol        (symbol),
    .symbol_strobe (symbol_strobe)
  );

  qam_constant u_const (
    .b01     (symbol[1:0]),
    .b23     (symbol[3:2]),
    .i_level (i_level),
    .q_level (q_level)
  );

  qddfs #(.ACC_W(ACC_WIDTH), .ADDR_W(ROM_ADDR_W), .SAMPLE_W(SAMPLE_WIDTH)) u_qddfs (
    .clk     (clk),
    .rst     (rst_n),
    .code_f  (CODE_F),
    .sin_out (sin_out),
    .cos_out (cos_out)
  );

  signed_mult #(.A_W(8), .B_W(8)) u_mult_q (
    .a (sin_out),
    .b (q_level),
    .p (q_sin)
  );

  signed_mult #(.A_W(8), .B_W(8)) u_mult_i (
    .a (cos_out),
    .b (i_level),
    .p (i_cos)
  );

  qam_sum #(.W(16), .SCALE_DIV(SCALE_DIV), .OFFSET(DAC_OFFSET)) u_sum (
    .sin_sig (q_sin),
    .cos_sig (i_cos),
    .add     (qam_sum)
  );

  assign qamk = qam_sum[7:0];

  // The scaled sum must stay inside the 8-bit DAC range (0..255).
  a_dac_range: assert property (@(posedge clk) disable iff (!rst_n)
                                qam_sum >= 0 && qam_sum <= 255)
    else $error("QAM sample %0d outside the DAC range", qam_sum);

endmodule
