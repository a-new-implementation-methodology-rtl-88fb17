// db_reader: the reader (verifier V) of the Hancke-Kuhn distance bounding
// protocol, with the round-trip timer.
//
// Every bit the reader sends leaves on a falling edge of reader_signal_in,
// the ring oscillator signal coming back from the tag over channel 3 (the
// inverter that closes the ring sits in ring_osc).  One bit therefore
// occupies one full oscillator period, whose length grows with the distance.
//
//  * IDLE / DONE: wait for start; reader_data_out is 0.
//  * GEN_NV:  load the random generator with seed and shift out NV_BITS
//             nonce bits, then N_BITS challenge bits C; start the hash
//             R0 || R1 := h(K, N_V).
//  * SEND_NV: on successive falling edges send a start bit 1 and N_V, most
//             significant bit first.
//  * CHAL:    on the next falling edge start the timer and send c_1; on each
//             later falling edge read the answer Y_i to the previous
//             challenge from reader_data_in and send the next challenge.
//             With each challenge sent the expected answer G_i = R_i^{c_i}
//             is recorded.  The edge that reads Y_n stops the timer.
//  * COMPARE: auth_ok = (Y == G); in_range = (timer <= time_bound);
//             accept = both.
//
// Because the timer runs across all n bit exchanges, it reads n oscillator
// periods: n * 2 * (round-trip delay).  Its most significant six bits
// (dist_msb) are a coarse distance reading.  The document gives the flow
// chart, the 50 MHz timer started before the first challenge and stopped
// after the last answer, and the comparison of Y with G.  The start bit, the
// seeded pseudo-random generator, the time_bound check and generating C
// together with N_V are this design's choices.
//
// Timing: the answer to c_i is read one oscillator period after c_i is sent;
// timer = N_BITS * oscillator period in clk cycles, exactly.
module db_reader
  import db_pkg::*;
#(
  parameter int unsigned KEY_BITS   = KEY_BITS_D,
  parameter int unsigned NV_BITS    = NV_BITS_D,
  parameter int unsigned N_BITS     = N_BITS_D,
  parameter int unsigned TIMER_BITS = TIMER_BITS_D
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [31:0]           seed,
  input  logic [KEY_BITS-1:0]   key,
  input  logic [TIMER_BITS-1:0] time_bound,
  input  logic                  reader_signal_in,  // oscillator, channel 3
  output logic                  reader_data_out,   // channel 1, to the tag
  input  logic                  reader_data_in,    // channel 4, from the tag
  output logic                  busy,
  output logic                  done,              // one-cycle pulse
  output logic                  auth_ok,
  output logic                  in_range,
  output logic                  accept,
  output logic [TIMER_BITS-1:0] timer,
  output logic [5:0]            dist_msb,
  output logic [NV_BITS-1:0]    nonce,
  output logic [N_BITS-1:0]     challenge,
  output logic [N_BITS-1:0]     expected,          // G
  output logic [N_BITS-1:0]     received           // Y
);
  localparam int unsigned CW = $clog2(NV_BITS + N_BITS + 1);

  rd_state_e     state;
  logic          sig_q, fall;
  logic [CW-1:0] cnt;
  logic [N_BITS-1:0] c_sr, p0, p1;
  logic          rng_load, rng_step, rng_bit;
  logic          hash_go, prf_done;
  logic [N_BITS-1:0] r0, r1;
  logic          t_start, t_stop, t_clear;

  assign fall     = sig_q & ~reader_signal_in;
  assign busy     = (state != RD_IDLE) && (state != RD_DONE);
  assign dist_msb = timer[TIMER_BITS-1 -: 6];
  assign rng_load = start && !busy;
  assign rng_step = (state == RD_GEN_NV);
  assign t_clear  = start && !busy;
  assign t_start  = (state == RD_CHAL) && fall && (cnt == '0);
  assign t_stop   = (state == RD_CHAL) && fall && (cnt == CW'(N_BITS));

  lfsr u_rng (
    .clk, .rst, .load(rng_load), .seed, .step(rng_step),
    .bit_out(rng_bit), .state()
  );

  db_prf #(.KEY_BITS(KEY_BITS), .NV_BITS(NV_BITS), .N_BITS(N_BITS)) u_prf (
    .clk, .rst, .start(hash_go), .key, .nonce,
    .busy(), .done(prf_done), .r0, .r1
  );

  db_timer #(.WIDTH(TIMER_BITS)) u_timer (
    .clk, .rst, .clear(t_clear), .start(t_start), .stop(t_stop),
    .count(timer), .running()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state           <= RD_IDLE;
      sig_q           <= 1'b0;
      cnt             <= '0;
      c_sr            <= '0;
      p0              <= '0;
      p1              <= '0;
      hash_go         <= 1'b0;
      reader_data_out <= 1'b0;
      done            <= 1'b0;
      auth_ok         <= 1'b0;
      in_range        <= 1'b0;
      accept          <= 1'b0;
      nonce           <= '0;
      challenge       <= '0;
      expected        <= '0;
      received        <= '0;
    end else begin
      sig_q   <= reader_signal_in;
      hash_go <= 1'b0;
      done    <= 1'b0;
      if (prf_done) begin
        p0 <= r0;
        p1 <= r1;
      end
      unique case (state)
        RD_IDLE, RD_DONE: begin
          reader_data_out <= 1'b0;
          if (start) begin
            state    <= RD_GEN_NV;
            cnt      <= '0;
            auth_ok  <= 1'b0;
            in_range <= 1'b0;
            accept   <= 1'b0;
            expected <= '0;
            received <= '0;
          end
        end
        RD_GEN_NV: begin
          if (cnt < CW'(NV_BITS)) nonce <= {nonce[NV_BITS-2:0], rng_bit};
          else                    challenge <= {challenge[N_BITS-2:0], rng_bit};
          if (cnt == CW'(NV_BITS + N_BITS - 1)) begin
            hash_go <= 1'b1;
            cnt     <= '0;
            state   <= RD_SEND_NV;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RD_SEND_NV: begin
          if (fall) begin
            // start bit, then N_V from its most significant bit
            reader_data_out <= (cnt == '0) ? 1'b1 : nonce[NV_BITS - int'(cnt)];
            if (cnt == CW'(NV_BITS)) begin
              cnt   <= '0;
              c_sr  <= challenge;
              state <= RD_CHAL;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        RD_CHAL: begin
          if (fall) begin
            if (cnt != '0) received <= {received[N_BITS-2:0], reader_data_in};
            if (cnt < CW'(N_BITS)) begin
              reader_data_out <= c_sr[N_BITS-1];
              expected <= {expected[N_BITS-2:0],
                           c_sr[N_BITS-1] ? p1[N_BITS-1] : p0[N_BITS-1]};
              c_sr <= {c_sr[N_BITS-2:0], 1'b0};
              p0   <= {p0[N_BITS-2:0], 1'b0};
              p1   <= {p1[N_BITS-2:0], 1'b0};
              cnt  <= cnt + 1'b1;
            end else begin
              reader_data_out <= 1'b0;
              state <= RD_COMPARE;
            end
          end
        end
        RD_COMPARE: begin
          auth_ok  <= (received == expected);
          in_range <= (timer <= time_bound);
          accept   <= (received == expected) && (timer <= time_bound);
          done     <= 1'b1;
          state    <= RD_DONE;
        end
        default: state <= RD_IDLE;
      endcase
    end
  end
endmodule
