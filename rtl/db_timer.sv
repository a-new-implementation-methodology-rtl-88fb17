// db_timer: the reader's round-trip timer.
//
// A WIDTH-bit counter on the 50 MHz system clock.  clear zeroes it, start
// begins counting (from the current value), stop freezes it.  The count
// saturates at all ones instead of wrapping, so an over-long exchange never
// reads as a short one.  The document gives the 29-bit width and the 50 MHz
// timer clock; saturation and the clear input are this design's choices.
//
// Timing: the count increments on every clk edge while running; the edge on
// which start is sampled is the first counted edge, the edge on which stop is
// sampled is not counted.
module db_timer #(
  parameter int unsigned WIDTH = db_pkg::TIMER_BITS_D
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             start,
  input  logic             stop,
  output logic [WIDTH-1:0] count,
  output logic             running
);
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      count   <= '0;
      running <= 1'b0;
    end else begin
      if (stop)       running <= 1'b0;
      else if (start) running <= 1'b1;
      if (!stop && (start || running) && count != '1)
        count <= count + 1'b1;
    end
  end
endmodule
