// qddfs: quadrature direct digital frequency synthesizer.
//
// A phase accumulator adds the frequency code `code_f` every clock; its top
// ADDR_W bits address a sine ROM and a cosine ROM in parallel, and a
// registered subtractor removes the storage offset of 2^(SAMPLE_W-1) (128) so
// the outputs are two's-complement samples in -127..+127, 90 degrees apart,
// at f = code_f * F_CLK / 2^ACC_W (1 MHz for code 85899346 at 50 MHz).
// Timing: sin_out/cos_out show the accumulator value of two clocks earlier
// (one clock in the ROM address register, one in the subtractor register).
// `rst` is active low: it clears only the accumulator, asynchronously; the
// ROM and subtractor registers are not reset and hold valid data two clocks
// into reset. Structure, widths and the address slice A[31..19] follow the
// source design.
module qddfs
  import qam16_pkg::*;
#(
  parameter int unsigned ACC_W    = 32,
  parameter int unsigned ADDR_W   = 13,
  parameter int unsigned SAMPLE_W = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [ACC_W-1:0]           code_f,
  output logic signed [SAMPLE_W-1:0] sin_out,
  output logic signed [SAMPLE_W-1:0] cos_out
);

  localparam logic [SAMPLE_W-1:0] OFFSET = SAMPLE_W'(2 ** (SAMPLE_W - 1));

  logic [ACC_W-1:0]    phase;
  logic [ADDR_W-1:0]   rom_addr;
  logic [SAMPLE_W-1:0] sin_rom, cos_rom;

  phase_acc #(.ACC_W(ACC_W)) u_pa (
    .clk    (clk),
    .aclr   (!rst),
    .data   (code_f),
    .result (phase)
  );

  assign rom_addr = phase[ACC_W-1 -: ADDR_W];

  wave_rom #(.ADDR_W(ADDR_W), .DATA_W(SAMPLE_W), .WAVE(WAVE_SIN)) u_rom_sin (
    .clk     (clk),
    .address (rom_addr),
    .q       (sin_rom)
  );

  wave_rom #(.ADDR_W(ADDR_W), .DATA_W(SAMPLE_W), .WAVE(WAVE_COS)) u_rom_cos (
    .clk     (clk),
    .address (rom_addr),
    .q       (cos_rom)
  );

  always_ff @(posedge clk) begin
    sin_out <= $signed(sin_rom - OFFSET);
    cos_out <= $signed(cos_rom - OFFSET);
  end

endmodule
