// phase_acc: phase accumulator (PA) of the direct digital synthesizer.
//
// Every clock the frequency code `data` (L) is added to the unsigned phase
// register, which wraps modulo 2^ACC_W, so the top bits of `result` sweep one
// full carrier period at f = L * F_CLK / 2^ACC_W. `result` is the register
// itself: it changes one clock after a new code is presented.
// `aclr` clears the register asynchronously (active high); in the QDDFS it is
// the inverted RST pin. The width (32 bits), the unsigned arithmetic and the
// asynchronous clear follow the source design.
module phase_acc #(
  parameter int unsigned ACC_W = 32
) (
  input  logic             clk,
  input  logic             aclr,
  input  logic [ACC_W-1:0] data,
  output logic [ACC_W-1:0] result
);

  always_ff @(posedge clk or posedge aclr) begin
    if (aclr) result <= '0;
    else      result <= result + data;
  end

endmodule
