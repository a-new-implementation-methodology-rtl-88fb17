// db_prf: the pseudorandom function R0 || R1 := h(K, N_V) of the protocol.
//
// The key K and the nonce N_V are concatenated (K in the high bits), padded
// to one SHA-1 block and hashed by sha1_core.  The first N_BITS bits of the
// digest become R0 and the next N_BITS bits R1, both most significant bit
// first: R0[N_BITS-1] is R^0_1, the answer to a 0 in the first challenge.
// Concatenation and the split follow the document's Eq. 4; the hash
// (SHA-1), the order K then N_V and keeping the digest's leading bits are
// this design's choices.
//
// Interface: pulse start with key and nonce stable; done pulses one cycle
// when r0 and r1 are valid (82 cycles later); they hold until the next start.
module db_prf #(
  parameter int unsigned KEY_BITS = db_pkg::KEY_BITS_D,
  parameter int unsigned NV_BITS  = db_pkg::NV_BITS_D,
  parameter int unsigned N_BITS   = db_pkg::N_BITS_D
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [KEY_BITS-1:0] key,
  input  logic [NV_BITS-1:0]  nonce,
  output logic                busy,
  output logic                done,
  output logic [N_BITS-1:0]   r0,
  output logic [N_BITS-1:0]   r1
);
  localparam int unsigned MSG_BITS = KEY_BITS + NV_BITS;

  logic [511:0] block;
  logic [159:0] digest;

  always_comb block = db_pkg::sha1_pad(447'({key, nonce}), MSG_BITS);

  sha1_core u_sha (
    .clk, .rst, .start, .block, .busy, .done, .digest
  );

  assign r0 = digest[159 -: N_BITS];
  assign r1 = digest[159-N_BITS -: N_BITS];

  initial begin
    assert (MSG_BITS <= 447) else $error("db_prf: K and N_V exceed one SHA-1 block");
    assert (2 * N_BITS <= 160) else $error("db_prf: R0 || R1 exceeds the digest");
  end
endmodule
