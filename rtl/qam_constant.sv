// qam_constant: the constant block of the QAM-16 modulator.
//
// Turns the two bit pairs of a 4-bit symbol into the constellation levels:
// b01 (symbol bits 1:0) selects I and b23 (symbol bits 3:2) selects Q, each
// from the constants +3, +1, -3, -1 through a 4-to-1 multiplexer:
//   I: 00 -> +3, 01 -> +1, 10 -> -3, 11 -> -1
//   Q: 00 -> +3, 01 -> -3, 10 -> +1, 11 -> -1
// This is the source design's Gray-like constellation (symbol 0000 at
// I=+3,Q=+3, 1001 at +1,+1, ...). Outputs are 8-bit two's complement and
// purely combinational. The constants are literals here instead of being
// formed by subtractors.
module qam_constant
  import qam16_pkg::*;
(
  input  logic [1:0] b01,
  input  logic [1:0] b23,
  output sample_t    i_level,
  output sample_t    q_level
);

  always_comb begin
    unique case (b01)
      2'd0: i_level = LEVEL_P3;
      2'd1: i_level = LEVEL_P1;
      2'd2: i_level = LEVEL_M3;
      2'd3: i_level = LEVEL_M1;
    endcase
  end

  always_comb begin
    unique case (b23)
      2'd0: q_level = LEVEL_P3;
      2'd1: q_level = LEVEL_M3;
      2'd2: q_level = LEVEL_P1;
      2'd3: q_level = LEVEL_M1;
    endcase
  end

endmodule
