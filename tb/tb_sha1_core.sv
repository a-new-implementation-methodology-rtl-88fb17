// tb_sha1_core: checks sha1_core against published SHA-1 digests ("abc",
// the empty string, 0xdeadbeef) and against the reference model for random
// short messages; also checks the 82-cycle start-to-done latency and that a
// start while busy is ignored.
module tb_sha1_core;
  import sha1_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [511:0] block;
  logic busy, done;
  logic [159:0] digest;
  int checks = 0, failures = 0;

  sha1_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [511:0] pad(input logic [446:0] m, input int len);
    logic [511:0] b;
    b = 512'(m) << (512 - len);
    b[511 - len] = 1'b1;
    b[63:0] = 64'(len);
    return b;
  endfunction

  task automatic run(input logic [511:0] blk, input logic [159:0] exp, input string name);
    int cyc;
    @(negedge clk);
    block = blk; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    // a second start while busy must be ignored
    block = ~blk; start = 1;
    @(negedge clk); start = 0; cyc++;
    block = blk;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (digest !== exp) begin
      failures++;
      $display("FAIL %s: digest %h expected %h", name, digest, exp);
    end
    checks++;
    if (cyc != 82) begin
      failures++;
      $display("FAIL %s: latency %0d expected 82", name, cyc);
    end
  endtask

  initial begin
    block = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(pad(447'h616263, 24), 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "abc");
    run(pad(447'h0, 0),       160'hda39a3ee5e6b4b0d3255bfef95601890afd80709, "empty");
    run(pad(447'hdeadbeef, 32), 160'hd78f8bb992a56a597f6c7a1fb918bb78271367eb, "deadbeef");
    checks++;
    if (sha1_bits(447'h616263, 24) !== 160'ha9993e364706816aba3e25717850c26c9cd0d89d) begin
      failures++; $display("FAIL reference model");
    end
    for (int i = 0; i < 20; i++) begin
      logic [446:0] m;
      int len;
      len = $urandom_range(1, 447);
      for (int j = 0; j < 447; j += 32) m[j +: 32] = 32'($urandom);
      m = m & ((447'd1 << len) - 1);
      run(pad(m, len), sha1_bits(m, len), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
