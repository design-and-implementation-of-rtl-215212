// wave_rom: one lookup table of the QDDFS, a 2^ADDR_W x DATA_W sine or
// cosine ROM (ROM_SIN / ROM_COS).
//
// Entry i holds INT[A * sin(2*pi*i/2^ADDR_W)] + 2^(DATA_W-1) (cos for
// WAVE == WAVE_COS), with A = 2^(DATA_W-1) - 1 and INT truncating toward
// zero. For the default 8192 x 8 table that is 127*sin(360 deg * i / 8192)
// plus an offset of 128, so every entry lies in 1..255 and is stored
// unsigned. The table formula, the truncation and the offset follow the
// source design.
//
// The contents are computed when the memory is initialised, with integer
// arithmetic only so that synthesis tools can evaluate it: sin and cos of
// the step angle d = 2*pi/2^ADDR_W are found by Taylor series in Q62 fixed
// point (pi is a 128-bit constant, round(pi * 2^125)), the first quadrant
// follows from the recurrence s[k+1] = 2*cos(d)*s[k] - s[k-1], and the other
// three quadrants by symmetry. The recurrence error stays below 1e-11 of full
// scale, far from changing any truncated entry.
//
// Timing: the address is registered on the rising clock edge and the data
// output follows that register combinationally (one clock of latency), as in
// a synchronous-address block RAM.
module wave_rom
  import qam16_pkg::*;
#(
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned DATA_W = 8,
  parameter wave_e       WAVE   = WAVE_SIN
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] address,
  output logic [DATA_W-1:0] q
);

  localparam int unsigned DEPTH   = 2 ** ADDR_W;
  localparam int unsigned QUARTER = DEPTH / 4;
  localparam int unsigned FRAC    = 62;                         // Q62 fixed point
  localparam logic signed [127:0] ONE   = 128'sd1 <<< FRAC;
  localparam logic signed [127:0] PI125 = 128'sh6487ed5110b4611a62633145c06e0e69;
  localparam logic signed [127:0] AMPL  = 128'(2 ** (DATA_W - 1) - 1);
  localparam logic [DATA_W-1:0]   OFFSET = DATA_W'(2 ** (DATA_W - 1));

  logic [DATA_W-1:0] rom [DEPTH];
  logic [ADDR_W-1:0] addr_q;

  // Truncated, offset table entry for a Q62 sine value.
  function automatic logic [DATA_W-1:0] entry(input logic signed [127:0] s);
    logic signed [127:0] mag;
    mag = ((s < 0) ? -s : s) * AMPL;
    mag = mag >>> FRAC;
    return (s < 0) ? OFFSET - DATA_W'(mag) : OFFSET + DATA_W'(mag);
  endfunction

  // Store the value of sin(2*pi*idx/DEPTH); the cosine table is the sine
  // table read a quarter turn later.
  function automatic int unsigned slot(input int unsigned idx);
    return (WAVE == WAVE_COS) ? (idx + DEPTH - QUARTER) % DEPTH : idx % DEPTH;
  endfunction

  initial begin
    logic signed [127:0] x, x2, term, sin_d, cos_d, s_prev, s_cur, s_next;
    // step angle d = 2*pi/DEPTH in Q62, rounded
    x  = (PI125 + (128'sd1 <<< (61 + ADDR_W))) >>> (62 + ADDR_W);
    x2 = (x * x) >>> FRAC;
    // Taylor series of sin(d) and cos(d)
    sin_d = 0;
    term  = x;
    for (int n = 1; n < 40 && term != 0; n += 2) begin
      sin_d += term;
      term = -(((term * x2) >>> FRAC) / $signed({96'd0, 32'((n + 1) * (n + 2))}));
    end
    cos_d = 0;
    term  = ONE;
    for (int n = 0; n < 40 && term != 0; n += 2) begin
      cos_d += term;
      term = -(((term * x2) >>> FRAC) / $signed({96'd0, 32'((n + 1) * (n + 2))}));
    end
    // first quadrant by recurrence, the rest by symmetry
    s_prev = 0;
    s_cur  = 0;
    for (int unsigned k = 0; k <= QUARTER; k++) begin
      if (k == 0)            s_next = 0;
      else if (k == 1)       s_next = sin_d;
      else if (k == QUARTER) s_next = ONE;
      else                   s_next = ((2 * cos_d * s_cur) >>> FRAC) - s_prev;
      rom[slot(k)]                 = entry(s_next);
      rom[slot(2 * QUARTER - k)]   = entry(s_next);
      rom[slot(2 * QUARTER + k)]   = entry(-s_next);
      rom[slot(4 * QUARTER - k)]   = entry(-s_next);
      if (k >= 1) begin
        s_prev = s_cur;
        s_cur  = s_next;
      end else begin
        s_cur  = s_next;
      end
    end
  end

  always_ff @(posedge clk) addr_q <= address;

  assign q = rom[addr_q];

endmodule
