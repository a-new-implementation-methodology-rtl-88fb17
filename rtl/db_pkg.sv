// db_pkg: shared constants, types and helper functions of the distance
// bounding system (reader, tag, shift-register channels).
//
// The sizes printed in the reference simulation are followed: a 13-bit nonce
// register, a 12-bit challenge register and a 29-bit timer.  The key width,
// the choice of SHA-1 as the hash "SHA" and the start-bit framing on the
// reader-to-tag channel are this design's own choices.
package db_pkg;

  // Default sizes.
  localparam int unsigned NV_BITS_D    = 13;    // nonce N_V length
  localparam int unsigned N_BITS_D     = 12;    // challenge / response count n
  localparam int unsigned KEY_BITS_D   = 32;    // shared secret K (assumed)
  localparam int unsigned TIMER_BITS_D = 29;    // reader timer width
  localparam int unsigned DIV_D        = 5000;  // 50 MHz / 10 kHz shift clock
  localparam int unsigned CHAN_LEN_D   = 100;   // flip-flops per channel (assumed)

  // SHA-1 block and digest sizes.
  localparam int unsigned SHA_BLOCK_BITS  = 512;
  localparam int unsigned SHA_DIGEST_BITS = 160;

  // Build the single padded SHA-1 message block for a message of MSG_BITS
  // bits held right-aligned in msg: message, a single 1, zeros, and the
  // 64-bit message length.  MSG_BITS must be at most 447.
  function automatic logic [SHA_BLOCK_BITS-1:0] sha1_pad(
      input logic [446:0] msg, input int unsigned msg_bits);
    logic [SHA_BLOCK_BITS-1:0] blk;
    blk = '0;
    for (int unsigned i = 0; i < 447; i++) begin
      if (i < msg_bits) blk[SHA_BLOCK_BITS-msg_bits+i] = msg[i];
    end
    blk[SHA_BLOCK_BITS-1-msg_bits] = 1'b1;
    blk[63:0] = 64'(msg_bits);
    return blk;
  endfunction

  // Reader control states.
  typedef enum logic [2:0] {
    RD_IDLE,     // waiting for start
    RD_GEN_NV,   // shifting the nonce out of the random generator
    RD_SEND_NV,  // start bit and N_V on channel 1
    RD_CHAL,     // rapid bit exchange, timer running
    RD_COMPARE,  // Y against G
    RD_DONE
  } rd_state_e;

  // Tag control states.
  typedef enum logic [1:0] {
    TG_IDLE,     // waiting for the start bit
    TG_RX_NV,    // receiving N_V
    TG_HASH,     // computing R0 || R1
    TG_CHAL      // answering challenges
  } tg_state_e;

endpackage
