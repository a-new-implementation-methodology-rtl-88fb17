// db_system: FPGA model of Hancke-Kuhn distance bounding with a
// distance-controlled ring oscillator.
//
// Reader and tag talk over four one-bit channels.  In the model each channel
// (RF transmitter, air gap, RF receiver) is a shift register; the number of
// flip-flops stands for the distance.  All channels shift on the 10 kHz
// shift tick; the reader's timer counts the 50 MHz system clock.
//
//   channel 1 (CH1_LEN): reader_data_out -> tag_data_in      (N_V, c_i)
//   channel 2 (CH2_LEN): reader inverter -> tag_signal_in    (oscillator)
//   channel 3 (CH3_LEN): tag_signal_out  -> reader_signal_in (oscillator)
//   channel 4 (CH4_LEN): tag_data_out    -> reader_data_in   (R_i^{c_i})
//
// Channels 2 and 3 with the inverter form a ring oscillator whose period is
// 2*(CH2_LEN + CH3_LEN) shift ticks; reader and tag exchange one bit per
// period, so the reader's timer, which spans all N_BITS exchanges, reads
// N_BITS * 2 * (CH2_LEN + CH3_LEN) * DIV clock cycles.  The reader accepts the
// tag when all answers match h(K, N_V) and the time is within time_bound.
//
// Channel lengths must be alike for the data to be read mid-bit:
// |CH1_LEN - CH2_LEN| < CH2_LEN + CH3_LEN and CH4_LEN < CH2_LEN + 2*CH3_LEN.
// The tag must finish its hash (82 cycles) within half an oscillator
// period: (CH2_LEN + CH3_LEN) * DIV > 82.
//
// The channel lengths are not given by the document; 100 flip-flops each is
// this design's default.
module db_system
  import db_pkg::*;
#(
  parameter int unsigned KEY_BITS   = KEY_BITS_D,
  parameter int unsigned NV_BITS    = NV_BITS_D,
  parameter int unsigned N_BITS     = N_BITS_D,
  parameter int unsigned TIMER_BITS = TIMER_BITS_D,
  parameter int unsigned DIV        = DIV_D,
  parameter int unsigned CH1_LEN    = CHAN_LEN_D,
  parameter int unsigned CH2_LEN    = CHAN_LEN_D,
  parameter int unsigned CH3_LEN    = CHAN_LEN_D,
  parameter int unsigned CH4_LEN    = CHAN_LEN_D
) (
  input  logic                  clk,          // 50 MHz system clock
  input  logic                  rst,          // synchronous, active high
  input  logic                  start,        // begin one authentication
  input  logic [31:0]           seed,         // random generator seed
  input  logic [KEY_BITS-1:0]   reader_key,   // K held by the reader
  input  logic [KEY_BITS-1:0]   tag_key,      // K held by the tag
  input  logic [TIMER_BITS-1:0] time_bound,   // largest accepted time
  output logic                  busy,
  output logic                  done,
  output logic                  auth_ok,      // Y == G
  output logic                  in_range,     // timer <= time_bound
  output logic                  accept,
  output logic [TIMER_BITS-1:0] timer,
  output logic [5:0]            dist_msb,
  output logic [NV_BITS-1:0]    reader_nv,
  output logic [N_BITS-1:0]     reader_c,
  output logic [N_BITS-1:0]     expected_bit_sequence,
  output logic [N_BITS-1:0]     reader_received,
  output logic [NV_BITS-1:0]    tag_received_nv,
  output logic [N_BITS-1:0]     tag_package_r0,
  output logic [N_BITS-1:0]     tag_package_r1,
  output logic [N_BITS-1:0]     tag_received_c,
  output logic                  tag_answering,
  output logic                  tag_done,
  output logic                  tag_signal_in,
  output logic                  tag_data_in,
  output logic                  reader_signal_in,
  output logic                  reader_data_in
);
  logic tick;
  logic tag_signal_out;
  logic reader_data_out, tag_data_out;

  tick_gen #(.DIV(DIV)) u_tick (.clk, .rst, .tick);

  // channels 2 and 3 with the reader's inverter
  ring_osc #(.FWD_LEN(CH2_LEN), .RET_LEN(CH3_LEN)) u_ring (
    .clk, .rst, .tick, .osc_out(), .tag_signal_in, .tag_signal_out,
    .reader_signal_in
  );

  shift_channel #(.LEN(CH1_LEN)) u_ch1 (
    .clk, .rst, .tick, .din(reader_data_out), .dout(tag_data_in)
  );

  shift_channel #(.LEN(CH4_LEN)) u_ch4 (
    .clk, .rst, .tick, .din(tag_data_out), .dout(reader_data_in)
  );

  db_reader #(
    .KEY_BITS(KEY_BITS), .NV_BITS(NV_BITS), .N_BITS(N_BITS),
    .TIMER_BITS(TIMER_BITS)
  ) u_reader (
    .clk, .rst, .start, .seed, .key(reader_key), .time_bound,
    .reader_signal_in, .reader_data_out, .reader_data_in,
    .busy, .done, .auth_ok, .in_range, .accept, .timer, .dist_msb,
    .nonce(reader_nv), .challenge(reader_c),
    .expected(expected_bit_sequence), .received(reader_received)
  );

  db_tag #(.KEY_BITS(KEY_BITS), .NV_BITS(NV_BITS), .N_BITS(N_BITS)) u_tag (
    .clk, .rst, .key(tag_key),
    .tag_signal_in, .tag_signal_out, .tag_data_in, .tag_data_out,
    .received_nv(tag_received_nv), .received_c(tag_received_c),
    .package_r0(tag_package_r0), .package_r1(tag_package_r1),
    .answering(tag_answering), .done(tag_done)
  );
endmodule
