// tick_gen: shift-clock enable for the channel shift registers.
//
// The channels of the model shift at 10 kHz while the system clock (and the
// reader timer) runs at 50 MHz.  Rather than a second clock, this block
// divides the system clock by DIV and emits a one-cycle enable pulse, tick,
// every DIV cycles; every shift register in the design is clocked by clk and
// advances only when tick is high.  The frequencies follow the document; the
// use of a clock enable instead of a derived clock is this design's choice.
//
// Timing: after reset the first tick comes DIV cycles later, then every DIV
// cycles.
module tick_gen #(
  parameter int unsigned DIV = db_pkg::DIV_D   // clk cycles per shift tick
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("tick_gen: DIV must be at least 2");
endmodule
