// tb_tick_gen: checks that tick is a one-cycle pulse every DIV cycles, the
// first one DIV cycles after reset, for DIV = 7 and DIV = 2.
module tb_tick_gen;
  logic clk = 0, rst = 1;
  logic tick7, tick2;
  int checks = 0, failures = 0;

  tick_gen #(.DIV(7)) dut7 (.clk, .rst, .tick(tick7));
  tick_gen #(.DIV(2)) dut2 (.clk, .rst, .tick(tick2));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (n = 1; n <= 200; n++) begin
      @(negedge clk);
      checks++;
      if (tick7 !== (n % 7 == 0)) begin
        failures++; $display("FAIL DIV=7 cycle %0d tick=%b", n, tick7);
      end
      checks++;
      if (tick2 !== (n % 2 == 0)) begin
        failures++; $display("FAIL DIV=2 cycle %0d tick=%b", n, tick2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
