// tb_cheat_oscillator: the attack in which a tag holding the right key
// breaks the ring and drives the return channel from an oscillator of its
// own, here faster than the honest ring.
//
// The system is assembled from its parts as in db_system, except that the
// tag's side of the ring is not closed by the tag's loop-back: both the tag
// and channel 3 take a free-running square wave of half period HC ticks.
// The reader then paces the exchange by that oscillator, and its timer reads
// N_BITS * 2 * HC * DIV instead of N_BITS * 2 * (CH2_LEN + CH3_LEN) * DIV.
// The testbench checks that the cheating tag is still authenticated, that
// the timer shows the forged (shorter) distance, and that a time bound the
// honest tag at the same place misses is met by the cheat.  This is a known
// limit of the scheme: the measured time is only as trustworthy as the
// tag's loop-back.
module tb_cheat_oscillator;
  import sha1_ref_pkg::*;
  localparam int NV = 13, N = 12, TW = 29, DIV = 20, L = 4, HC = 5;
  localparam int HONEST_T = N * 2 * (L + L) * DIV;
  localparam int CHEAT_T  = N * 2 * HC * DIV;

  logic clk = 0, rst = 1, start = 0;
  logic tick, cheat_osc = 0;
  logic tsi, tso_unused, rsi, rdo, rdi, tdi, tdo;
  logic busy, done, auth_ok, in_range, accept;
  logic [TW-1:0] timer;
  logic [5:0] dist_msb;
  logic [NV-1:0] nonce, t_nv;
  logic [N-1:0] challenge, expected, received, t_c, pk0, pk1;
  logic t_ans, t_done;
  logic [31:0] key = 32'h7e57_c0de, seed = 32'h0bad_5eed;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tick_gen #(.DIV(DIV)) u_tick (.clk, .rst, .tick);
  ring_osc #(.FWD_LEN(L), .RET_LEN(L)) u_ring (
    .clk, .rst, .tick, .osc_out(), .tag_signal_in(tsi),
    .tag_signal_out(cheat_osc), .reader_signal_in(rsi));
  shift_channel #(.LEN(L)) u_ch1 (.clk, .rst, .tick, .din(rdo), .dout(tdi));
  shift_channel #(.LEN(L)) u_ch4 (.clk, .rst, .tick, .din(tdo), .dout(rdi));

  db_reader u_reader (
    .clk, .rst, .start, .seed, .key, .time_bound(TW'(CHEAT_T)),
    .reader_signal_in(rsi), .reader_data_out(rdo), .reader_data_in(rdi),
    .busy, .done, .auth_ok, .in_range, .accept, .timer, .dist_msb,
    .nonce, .challenge, .expected, .received);

  // the cheating tag: right key, but paced by its own oscillator
  db_tag u_tag (
    .clk, .rst, .key, .tag_signal_in(cheat_osc), .tag_signal_out(tso_unused),
    .tag_data_in(tdi), .tag_data_out(tdo), .received_nv(t_nv), .received_c(t_c),
    .package_r0(pk0), .package_r1(pk1), .answering(t_ans), .done(t_done));

  // free-running oscillator of half period HC shift ticks
  initial begin
    int k = 0;
    forever begin
      @(posedge clk);
      if (tick && !rst) begin
        k++;
        if (k == HC) begin k = 0; cheat_osc <= ~cheat_osc; end
      end
    end
  end

  initial begin
    repeat (500000) @(posedge clk);
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
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (10) @(negedge clk);
    start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    chk(t_nv === nonce, "tag received the nonce");
    chk(auth_ok, "cheating tag answers correctly");
    chk(timer === TW'(CHEAT_T), $sformatf("timer %0d expected %0d", timer, CHEAT_T));
    chk(timer < TW'(HONEST_T), "tag appears nearer than it is");
    chk(accept, "cheating tag accepted under a bound the honest tag misses");
    $display("honest time %0d cycles, measured %0d cycles", HONEST_T, timer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
