// ring_osc: the distance-controlled ring oscillator.
//
// An inverter at the reader drives channel 2 towards the tag; at the tag the
// signal (tag_signal_in) is handed back as tag_signal_out onto channel 3,
// whose far end (reader_signal_in) feeds the inverter again.  The loop has an
// odd number of inversions, so it oscillates with a half period equal to the
// round-trip delay, FWD_LEN + RET_LEN shift ticks, and a full period of
// 2*(FWD_LEN + RET_LEN) ticks.  This is the document's Eq. 7 with the
// channel delays standing in for 2*t_p + t_d and the inverter delay ignored.
//
// The loop (inverter at the reader, two shift-register channels, loop-back at
// the tag) follows the FPGA prototype; the reset state is this design's.
// The tag's side of the loop is left open (tag_signal_in out, tag_signal_out
// in) so that the tag, or something impersonating it, closes it.
//
// Timing: reset clears both chains, so reader_signal_in is 0 and the
// inverter output 1 at reset; reader_signal_in first rises after
// FWD_LEN + RET_LEN ticks.
module ring_osc #(
  parameter int unsigned FWD_LEN = db_pkg::CHAN_LEN_D,  // channel 2 flip-flops
  parameter int unsigned RET_LEN = db_pkg::CHAN_LEN_D   // channel 3 flip-flops
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  output logic osc_out,          // inverter output at the reader
  output logic tag_signal_in,    // channel 2 output at the tag
  input  logic tag_signal_out,   // tag's loop-back onto channel 3
  output logic reader_signal_in  // channel 3 output at the reader
);
  assign osc_out = ~reader_signal_in;

  shift_channel #(.LEN(FWD_LEN)) u_ch2 (
    .clk, .rst, .tick, .din(osc_out), .dout(tag_signal_in)
  );

  shift_channel #(.LEN(RET_LEN)) u_ch3 (
    .clk, .rst, .tick, .din(tag_signal_out), .dout(reader_signal_in)
  );
endmodule
