// tb_db_timer: checks counting between start and stop, holding after stop,
// clear, and saturation at all ones (WIDTH = 6 and the default width).
module tb_db_timer;
  logic clk = 0, rst = 1, clear = 0, start = 0, stop = 0;
  logic [5:0] c6;
  logic [db_pkg::TIMER_BITS_D-1:0] cd;
  logic r6, rd;
  int checks = 0, failures = 0;

  db_timer #(.WIDTH(6)) dut6 (.clk, .rst, .clear, .start, .stop, .count(c6), .running(r6));
  db_timer              dutd (.clk, .rst, .clear, .start, .stop, .count(cd), .running(rd));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input int e6, input int ed, input string what);
    checks++;
    if (c6 !== 6'(e6) || cd !== db_pkg::TIMER_BITS_D'(ed)) begin
      failures++; $display("FAIL %s: %0d/%0d expected %0d/%0d", what, c6, cd, e6, ed);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(0, 0, "after reset");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (19) @(negedge clk);
    chk(20, 20, "running");
    stop = 1;
    @(negedge clk) stop = 0;
    chk(20, 20, "stop edge not counted");
    repeat (10) @(negedge clk);
    chk(20, 20, "held");
    checks++;
    if (r6 || rd) begin failures++; $display("FAIL running flag"); end
    clear = 1;
    @(negedge clk) clear = 0;
    chk(0, 0, "clear");
    start = 1;
    @(negedge clk) start = 0;
    repeat (99) @(negedge clk);
    chk(63, 100, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
