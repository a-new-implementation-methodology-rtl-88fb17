// tb_shift_channel: drives random bits with a random shift enable and checks
// that each bit appears at the output exactly LEN shifts later (LEN = 5 and
// the default length), and that reset clears the chain.
module tb_shift_channel;
  logic clk = 0, rst = 1, tick = 0, din = 0;
  logic dout5, doutd;
  int checks = 0, failures = 0;
  localparam int LD = db_pkg::CHAN_LEN_D;

  shift_channel #(.LEN(5)) dut5 (.clk, .rst, .tick, .din, .dout(dout5));
  shift_channel            dutd (.clk, .rst, .tick, .din, .dout(doutd));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic hist [$];
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < LD + 20; i++) hist.push_front(1'b0);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (dout5 !== hist[4]) begin failures++; $display("FAIL LEN=5 at %0d", i); end
      checks++;
      if (doutd !== hist[LD-1]) begin failures++; $display("FAIL LEN=%0d at %0d", LD, i); end
      tick = ($urandom_range(0, 2) != 0);
      din  = 1'($urandom);
      if (tick) begin hist.push_front(din); void'(hist.pop_back()); end
    end
    @(negedge clk) begin tick = 1; din = 1; end
    @(negedge clk) begin tick = 0; rst = 1; end
    @(negedge clk) rst = 0;
    checks++;
    if (dutd.sr !== '0 || dut5.sr !== '0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
