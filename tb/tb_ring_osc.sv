// tb_ring_osc: closes the loop at the tag side and checks that the ring
// oscillates with period 2*(FWD_LEN + RET_LEN) shift ticks, that
// tag_signal_in is the inverter output delayed by FWD_LEN ticks and that
// reader_signal_in first rises FWD_LEN + RET_LEN ticks after reset.
// Two sizes: 3 + 4 with a tick every cycle, 5 + 2 with a tick every 3rd.
module tb_ring_osc;
  logic clk = 0, rst = 1;
  logic tick_a, tick_b = 1'b0;
  logic osc_a, tsi_a, rsi_a, osc_b, tsi_b, rsi_b;
  int checks = 0, failures = 0;
  int tc = 0;

  assign tick_a = 1'b1;

  ring_osc #(.FWD_LEN(3), .RET_LEN(4)) dut_a (
    .clk, .rst, .tick(tick_a), .osc_out(osc_a), .tag_signal_in(tsi_a),
    .tag_signal_out(tsi_a), .reader_signal_in(rsi_a));
  ring_osc #(.FWD_LEN(5), .RET_LEN(2)) dut_b (
    .clk, .rst, .tick(tick_b), .osc_out(osc_b), .tag_signal_in(tsi_b),
    .tag_signal_out(tsi_b), .reader_signal_in(rsi_b));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected waveforms, counted in ticks k = 0, 1, ... after reset:
  // reader_signal_in(k) = ((k / H) mod 2), tag_signal_in(k) = ~rsi(k - FWD)
  function automatic logic rsi_model(input int k, input int h);
    return (k / h) % 2 == 1;
  endfunction
  function automatic logic tsi_model(input int k, input int fwd, input int h);
    return (k < fwd) ? 1'b0 : !rsi_model(k - fwd, h);
  endfunction

  initial begin
    int ka = 0, kb = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 600; i++) begin
      checks++;
      if (rsi_a !== rsi_model(ka, 7) || tsi_a !== tsi_model(ka, 3, 7)) begin
        failures++; $display("FAIL a at tick %0d: rsi=%b tsi=%b", ka, rsi_a, tsi_a);
      end
      checks++;
      if (rsi_b !== rsi_model(kb, 7) || tsi_b !== tsi_model(kb, 5, 7)) begin
        failures++; $display("FAIL b at tick %0d: rsi=%b tsi=%b", kb, rsi_b, tsi_b);
      end
      checks++;
      if (osc_a !== !rsi_a) begin failures++; $display("FAIL inverter"); end
      // the tick seen by the next rising edge is counted now; tc only
      // changes on falling edges so the shift registers never race with it
      if (tick_a) ka++;
      if (tick_b) kb++;
      @(negedge clk);
      tc++;
      tick_b = (tc % 3 == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
