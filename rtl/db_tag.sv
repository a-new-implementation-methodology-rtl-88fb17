// db_tag: the tag (prover P) of the Hancke-Kuhn distance bounding protocol.
//
// The tag has no timing of its own: every step is triggered by the ring
// oscillator signal that reaches it over channel 2 (tag_signal_in), which it
// also hands straight back onto channel 3 (tag_signal_out) to close the
// loop.  Data from the reader arrives on tag_data_in (channel 1) and is read
// on each falling edge of tag_signal_in.
//
//  * IDLE:  wait for a falling edge that reads a 1 (the start bit).
//  * RX_NV: read NV_BITS nonce bits, most significant first.
//  * HASH:  R0 || R1 := h(K, N_V) with db_prf; R0 and R1 go to two N_BITS
//           shift registers (the "packages").
//  * CHAL:  the answer is a multiplexer from the incoming challenge bit:
//           tag_data_out = c ? R1[msb] : R0[msb].  It follows tag_data_in
//           without waiting for any clock edge, which is the point of the
//           protocol.  The challenge is read on the falling edge; on the next
//           rising edge, when the next challenge arrives, both packages shift
//           left by one with zero fill.  After N_BITS challenges the tag
//           returns to IDLE.
//
// The document gives the flow (receive N_V, hash, answer n challenges), the
// falling-edge read, the package shifting and the combinational answer.  The
// start bit, the use of rising edges for the package shift and detecting
// the edges of tag_signal_in with the system clock are this design's
// choices.  The system clock is far faster than the shift clock, so edge
// detection costs one system cycle, which is not measurable by the reader.
//
// Timing: the hash (82 cycles) must end before the first challenge arrives,
// half an oscillator period after the last nonce bit is read; an assertion
// checks this.
module db_tag
  import db_pkg::*;
#(
  parameter int unsigned KEY_BITS = KEY_BITS_D,
  parameter int unsigned NV_BITS  = NV_BITS_D,
  parameter int unsigned N_BITS   = N_BITS_D
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [KEY_BITS-1:0] key,
  input  logic                tag_signal_in,   // oscillator from channel 2
  output logic                tag_signal_out,  // loop-back onto channel 3
  input  logic                tag_data_in,     // channel 1, from the reader
  output logic                tag_data_out,    // channel 4, to the reader
  output logic [NV_BITS-1:0]  received_nv,
  output logic [N_BITS-1:0]   received_c,
  output logic [N_BITS-1:0]   package_r0,
  output logic [N_BITS-1:0]   package_r1,
  output logic                answering,       // in the challenge phase
  output logic                done             // one-cycle pulse at the end
);
  localparam int unsigned CW = $clog2((NV_BITS > N_BITS ? NV_BITS : N_BITS) + 1);

  tg_state_e     state;
  logic          sig_q, fall, rise;
  logic [CW-1:0] cnt;
  logic          pend;       // a challenge was read, shift on the next rise
  logic          hash_go;
  logic          prf_done;
  logic [N_BITS-1:0] r0, r1;

  assign tag_signal_out = tag_signal_in;
  assign fall = sig_q & ~tag_signal_in;
  assign rise = ~sig_q & tag_signal_in;
  assign answering = (state == TG_CHAL);

  // Rapid bit exchange: the answer depends on the arriving bit directly.
  assign tag_data_out = answering &&
                        (tag_data_in ? package_r1[N_BITS-1] : package_r0[N_BITS-1]);

  db_prf #(.KEY_BITS(KEY_BITS), .NV_BITS(NV_BITS), .N_BITS(N_BITS)) u_prf (
    .clk, .rst, .start(hash_go), .key, .nonce(received_nv),
    .busy(), .done(prf_done), .r0, .r1
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= TG_IDLE;
      sig_q       <= 1'b0;
      cnt         <= '0;
      pend        <= 1'b0;
      hash_go     <= 1'b0;
      done        <= 1'b0;
      received_nv <= '0;
      received_c  <= '0;
      package_r0  <= '0;
      package_r1  <= '0;
    end else begin
      sig_q   <= tag_signal_in;
      hash_go <= 1'b0;
      done    <= 1'b0;
      unique case (state)
        TG_IDLE: begin
          if (fall && tag_data_in) begin
            state <= TG_RX_NV;
            cnt   <= '0;
          end
        end
        TG_RX_NV: begin
          if (fall) begin
            received_nv <= {received_nv[NV_BITS-2:0], tag_data_in};
            if (cnt == CW'(NV_BITS - 1)) begin
              hash_go <= 1'b1;
              state   <= TG_HASH;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        TG_HASH: begin
          if (prf_done) begin
            package_r0 <= r0;
            package_r1 <= r1;
            received_c <= '0;
            cnt        <= '0;
            pend       <= 1'b0;
            state      <= TG_CHAL;
          end
        end
        TG_CHAL: begin
          if (fall) begin
            received_c <= {received_c[N_BITS-2:0], tag_data_in};
            cnt        <= cnt + 1'b1;
            pend       <= 1'b1;
          end else if (rise && pend) begin
            package_r0 <= {package_r0[N_BITS-2:0], 1'b0};
            package_r1 <= {package_r1[N_BITS-2:0], 1'b0};
            pend       <= 1'b0;
            if (cnt == CW'(N_BITS)) begin
              state <= TG_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= TG_IDLE;
      endcase
    end
  end

  // The hash must be ready before the first challenge bit reaches the tag.
  a_hash_in_time: assert property (@(posedge clk) disable iff (rst)
    (state == TG_HASH) |-> !(rise || fall))
    else $error("db_tag: challenge arrived before h(K, N_V) was ready");
endmodule
