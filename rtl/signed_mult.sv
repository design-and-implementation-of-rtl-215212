// signed_mult: combinational two's-complement multiplier.
//
// p = a * b with a full-width (A_W + B_W bit) signed product. In the
// modulator one instance forms Q*SIN and another I*COS, both 8 x 8 -> 16
// bits, with no pipeline register, as in the source design.
module signed_mult #(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 8
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  assign p = (A_W + B_W)'(a) * (A_W + B_W)'(b);

endmodule
