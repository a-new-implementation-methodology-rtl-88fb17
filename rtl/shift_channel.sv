// shift_channel: one radio channel of the FPGA model.
//
// In the hardware model the RF transmitter, the air gap and the RF receiver
// of one channel are replaced by a chain of LEN flip-flops: a bit put on din
// appears on dout LEN shift ticks later, so LEN stands for the distance
// between reader and tag.  The chain shifts on the system clock when tick is
// high and resets to all zeros.  Changing LEN changes the modelled distance.
// Standing shift registers in for the radios follows the FPGA prototype;
// the zero reset and the shift enable are this design's choices.
//
// Timing: dout is the last stage of the chain; a value sampled from din at
// tick k is on dout after tick k+LEN-1 has completed (LEN ticks of delay).
module shift_channel #(
  parameter int unsigned LEN = db_pkg::CHAN_LEN_D  // flip-flops in the chain
) (
  input  logic clk,
  input  logic rst,
  input  logic tick,
  input  logic din,
  output logic dout
);
  logic [LEN-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)       sr <= '0;
    else if (tick) sr <= {sr[LEN-2:0], din};
  end

  assign dout = sr[LEN-1];

  initial assert (LEN >= 2) else $error("shift_channel: LEN must be at least 2");
endmodule
