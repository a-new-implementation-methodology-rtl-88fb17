// tb_db_system_full: one complete authentication of db_system at its
// default sizes: 50 MHz clock, 10 kHz shift tick (DIV = 5000), four channels
// of 100 flip-flops, 13-bit nonce, 12 challenges, 29-bit timer.
//
// The oscillator period is 2 * 200 ticks = 40 ms, so the whole exchange
// (idle, start bit, nonce, challenges) lasts a little over one second of
// simulated time.  The testbench checks the nonce, the challenges, the
// answers against the reference SHA-1, acceptance, and the timer value
// 12 * 400 * 5000 = 24,000,000 cycles (480 ms), i.e. dist_msb = 2.
module tb_db_system_full;
  import sha1_ref_pkg::*;
  localparam int NV = 13, N = 12, TW = 29;
  localparam int EXP_T = N * 2 * (2 * db_pkg::CHAN_LEN_D) * db_pkg::DIV_D;

  logic clk = 0, rst = 1, start = 0;
  logic [31:0] seed = 32'h2468_ace1, reader_key = 32'h5ec2_e7a1, tag_key = 32'h5ec2_e7a1;
  logic [TW-1:0] time_bound = TW'(EXP_T);
  logic busy, done, auth_ok, in_range, accept, tag_done;
  logic [TW-1:0] timer;
  logic [5:0] dist_msb;
  logic [NV-1:0] reader_nv, tag_received_nv;
  logic [N-1:0] reader_c, expected_bit_sequence, reader_received, tag_package_r0, tag_package_r1;
  logic [N-1:0] tag_received_c;
  logic tag_answering;
  logic tag_signal_in, tag_data_in, reader_signal_in, reader_data_in;
  int checks = 0, failures = 0;

  db_system dut (.*);
  always #10 clk = ~clk;   // 20 ns, 50 MHz

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] m;
    logic [NV-1:0] e_nv;
    logic [N-1:0] e_c, e_g;
    logic [63:0] r0, r1;
    m = seed;
    for (int i = 0; i < NV; i++) e_nv = {e_nv[NV-2:0], lfsr_next(m)};
    for (int i = 0; i < N; i++)  e_c  = {e_c[N-2:0], lfsr_next(m)};
    r_split(64'(reader_key), 32, 64'(e_nv), NV, N, r0, r1);
    for (int i = 0; i < N; i++) e_g[i] = e_c[i] ? r1[i] : r0[i];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    chk(reader_nv === e_nv && tag_received_nv === e_nv, "nonce at reader and tag");
    chk(reader_c === e_c && tag_received_c === e_c, "challenges at reader and tag");
    chk(expected_bit_sequence === e_g, "expected answers G");
    chk(reader_received === e_g, "received answers Y");
    chk(timer === TW'(EXP_T), $sformatf("timer %0d expected %0d", timer, EXP_T));
    chk(dist_msb === 6'(EXP_T >> (TW - 6)), "distance reading");
    chk(auth_ok && in_range && accept, "tag accepted");
    $display("timer %0d cycles = %0d us, dist_msb %0d", timer, timer / 50, dist_msb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
