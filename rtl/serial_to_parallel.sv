// serial_to_parallel: collects the serial data stream into QAM-16 symbols.
//
// Each clock with bit_valid high shifts bit_in into a BITS-bit shift
// register; the first bit of a group ends up as the symbol MSB. When the
// BITS-th bit of a group arrives, the completed group is copied to `symbol`
// on the same edge and `symbol_strobe` pulses for one clock; `symbol` then
// holds until the next group is complete, so the modulator sends one symbol
// for every BITS data bits. Bits 1:0 of the symbol select I and bits 3:2
// select Q. The bit order, the bit_valid strobe and the asynchronous
// active-low reset (symbol 0000) are this design's choices; the source only
// names the converter.
module serial_to_parallel #(
  parameter int unsigned BITS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bit_in,
  input  logic            bit_valid,
  output logic [BITS-1:0] symbol,
  output logic            symbol_strobe
);

  logic [BITS-2:0]         shreg;  // bits of the group received so far
  logic [$clog2(BITS)-1:0] count;
  logic [BITS-1:0]         next_shreg;

  assign next_shreg = {shreg, bit_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg         <= '0;
      count         <= '0;
      symbol        <= '0;
      symbol_strobe <= 1'b0;
    end else begin
      symbol_strobe <= 1'b0;
      if (bit_valid) begin
        shreg <= next_shreg[BITS-2:0];
        if (count == $clog2(BITS)'(BITS - 1)) begin
          count         <= '0;
          symbol        <= next_shreg;
          symbol_strobe <= 1'b1;
        end else begin
          count <= count + 1'b1;
        end
      end
    end
  end

endmodule
