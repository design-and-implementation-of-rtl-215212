// qam_sum: summation and scaling block of the QAM-16 modulator.
//
// add = (sin_sig + cos_sig) / SCALE_DIV + OFFSET.
// The sum Q*sin + I*cos of the two products is divided by 5 and moved up by
// 128 so that it fits the 8-bit range of the output DAC: with levels of at
// most 3 and samples of at most 127 the sum lies within +-3*127*sqrt(2)
// (about +-539), the scaled value within 20..236. The division is signed and
// truncates toward zero (the rounding is this design's choice). All
// arithmetic is W bits wide and combinational; the structure (add, divide by
// a constant 5, add 128) follows the source design.
module qam_sum #(
  parameter int unsigned W         = 16,
  parameter int unsigned SCALE_DIV = 5,
  parameter int unsigned OFFSET    = 128
) (
  input  logic signed [W-1:0] sin_sig,
  input  logic signed [W-1:0] cos_sig,
  output logic signed [W-1:0] add
);

  localparam logic signed [W-1:0] DIV = W'(SCALE_DIV);
  localparam logic signed [W-1:0] OFS = W'(OFFSET);

  logic signed [W-1:0] sum, quotient;

  always_comb begin
    sum      = sin_sig + cos_sig;
    quotient = sum / DIV;
    add      = quotient + OFS;
  end

endmodule
