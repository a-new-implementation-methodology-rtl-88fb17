// lfsr: random bit source of the reader (nonce N_V and challenges c_i).
//
// A 32-bit Galois linear feedback shift register with the maximal-length
// polynomial x^32 + x^22 + x^2 + x + 1 (mask 0x80200003).  load copies seed
// into the register (an all-zero seed is replaced by 1, since zero is the
// lock-up state); each cycle with step high advances it by one bit, and bit
// is the bit shifted out by that step.  The document only asks for random
// bits; the generator is this design's choice and is pseudo-random, so a
// product would seed it from a true entropy source.
module lfsr #(
  parameter logic [31:0] MASK = 32'h8020_0003
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [31:0] seed,
  input  logic        step,
  output logic        bit_out,
  output logic [31:0] state
);
  assign bit_out = state[0];

  always_ff @(posedge clk) begin
    if (rst)       state <= 32'h1;
    else if (load) state <= (seed == '0) ? 32'h1 : seed;
    else if (step) state <= state[0] ? ((state >> 1) ^ MASK) : (state >> 1);
  end
endmodule
