// tb_db_system: end-to-end runs of reader, tag and channels at reduced
// sizes (DIV = 20 clock cycles per shift tick, channels of a few
// flip-flops).
//
// Three systems stand side by side: A with four channels of 4 flip-flops,
// B with 7 (a tag further away), and C with unequal channels (5, 4, 6, 5).
// For each authentication the testbench works out, independently of the
// RTL, the nonce and challenges from the seed, R0/R1 from the reference
// SHA-1, the expected answers and the exact timer value
// N_BITS * 2 * (CH2_LEN + CH3_LEN) * DIV, and checks the reader's verdict.
// Mechanisms counted, each of which must occur: accepted tag, tag with the
// wrong key rejected, tag beyond the time bound rejected, timer growing with
// the distance, the tag's asynchronous answers matching R_i^{c_i}.
module tb_db_system;
  import sha1_ref_pkg::*;
  localparam int NV = 13, N = 12, TW = 29, DIV = 20;
  localparam int NSYS = 3;
  localparam int CH1 [NSYS] = '{4, 7, 5};
  localparam int CH2 [NSYS] = '{4, 7, 4};
  localparam int CH3 [NSYS] = '{4, 7, 6};
  localparam int CH4 [NSYS] = '{4, 7, 5};

  logic clk = 0, rst = 1;
  logic [NSYS-1:0] start = '0;
  logic [31:0] seed [NSYS];
  logic [31:0] reader_key [NSYS], tag_key [NSYS];
  logic [TW-1:0] time_bound [NSYS];
  logic [NSYS-1:0] busy, done, auth_ok, in_range, accept, tag_done, tag_ans;
  logic [N-1:0] tag_rc [NSYS];
  logic [TW-1:0] timer [NSYS];
  logic [5:0] dist_msb [NSYS];
  logic [NV-1:0] reader_nv [NSYS], tag_received_nv [NSYS];
  logic [N-1:0] reader_c [NSYS], expected [NSYS], received [NSYS];
  logic [N-1:0] pk0 [NSYS], pk1 [NSYS];
  logic [NSYS-1:0] tsi, tdi, rsi, rdi;
  int checks = 0, failures = 0;
  int n_accept = 0, n_wrong_key = 0, n_too_far = 0, n_further = 0, n_answers = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NSYS; g++) begin : g_sys
    db_system #(
      .DIV(DIV), .CH1_LEN(CH1[g]), .CH2_LEN(CH2[g]), .CH3_LEN(CH3[g]), .CH4_LEN(CH4[g])
    ) dut (
      .clk, .rst, .start(start[g]), .seed(seed[g]), .reader_key(reader_key[g]),
      .tag_key(tag_key[g]), .time_bound(time_bound[g]), .busy(busy[g]), .done(done[g]),
      .auth_ok(auth_ok[g]), .in_range(in_range[g]), .accept(accept[g]), .timer(timer[g]),
      .dist_msb(dist_msb[g]), .reader_nv(reader_nv[g]), .reader_c(reader_c[g]),
      .expected_bit_sequence(expected[g]), .reader_received(received[g]),
      .tag_received_nv(tag_received_nv[g]), .tag_package_r0(pk0[g]),
      .tag_package_r1(pk1[g]), .tag_received_c(tag_rc[g]), .tag_answering(tag_ans[g]),
      .tag_done(tag_done[g]), .tag_signal_in(tsi[g]),
      .tag_data_in(tdi[g]), .reader_signal_in(rsi[g]), .reader_data_in(rdi[g])
    );
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // run one authentication on system g; returns the timer value
  task automatic auth(input int g, input logic [31:0] s, input logic [31:0] kr,
                      input logic [31:0] kt, input int bound_delta, output int t_out);
    logic [31:0] m;
    logic [NV-1:0] e_nv;
    logic [N-1:0] e_c, e_g, e_y;
    logic [63:0] r0, r1, q0, q1;
    int exp_t;
    logic exp_auth;
    m = (s == 0) ? 32'h1 : s;
    for (int i = 0; i < NV; i++) e_nv = {e_nv[NV-2:0], lfsr_next(m)};
    for (int i = 0; i < N; i++)  e_c  = {e_c[N-2:0], lfsr_next(m)};
    r_split(64'(kr), 32, 64'(e_nv), NV, N, r0, r1);
    r_split(64'(kt), 32, 64'(e_nv), NV, N, q0, q1);
    for (int i = 0; i < N; i++) begin
      e_g[i] = e_c[i] ? r1[i] : r0[i];
      e_y[i] = e_c[i] ? q1[i] : q0[i];
    end
    exp_auth = (e_g == e_y);
    exp_t = N * 2 * (CH2[g] + CH3[g]) * DIV;
    @(negedge clk);
    seed[g] = s; reader_key[g] = kr; tag_key[g] = kt;
    time_bound[g] = TW'(exp_t + bound_delta);
    start[g] = 1;
    @(negedge clk) start[g] = 0;
    while (!done[g]) @(negedge clk);
    chk(reader_nv[g] === e_nv, $sformatf("sys %0d nonce", g));
    chk(tag_received_nv[g] === e_nv, $sformatf("sys %0d tag nonce %h expected %h",
                                                g, tag_received_nv[g], e_nv));
    chk(reader_c[g] === e_c && tag_rc[g] === e_c, $sformatf("sys %0d challenges", g));
    chk(expected[g] === e_g, $sformatf("sys %0d G", g));
    chk(received[g] === e_y, $sformatf("sys %0d Y %h expected %h", g, received[g], e_y));
    if (received[g] === e_y) n_answers++;
    chk(timer[g] === TW'(exp_t), $sformatf("sys %0d timer %0d expected %0d", g, timer[g], exp_t));
    chk(auth_ok[g] === exp_auth, $sformatf("sys %0d auth_ok", g));
    chk(in_range[g] === (bound_delta >= 0), $sformatf("sys %0d in_range", g));
    chk(accept[g] === (exp_auth && bound_delta >= 0), $sformatf("sys %0d accept", g));
    if (accept[g]) n_accept++;
    if (!exp_auth && !accept[g]) n_wrong_key++;
    if (bound_delta < 0 && !accept[g]) n_too_far++;
    t_out = int'(timer[g]);
    // let the tag return to idle before the next run
    repeat (4 * (CH1[g] + CH2[g] + CH3[g] + CH4[g]) * DIV) @(negedge clk);
  endtask

  initial begin
    int ta, tb, tc, t;
    foreach (seed[g]) begin
      seed[g] = 0; reader_key[g] = 0; tag_key[g] = 0; time_bound[g] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    auth(0, 32'h1234_5678, 32'h0123_4567, 32'h0123_4567, 0, ta);
    auth(1, 32'h1234_5678, 32'h0123_4567, 32'h0123_4567, 0, tb);
    auth(2, $urandom, 32'h89ab_cdef, 32'h89ab_cdef, 5, tc);
    // a tag further away needs proportionally more time
    chk(tb * (CH2[0] + CH3[0]) == ta * (CH2[1] + CH3[1]), "timer proportional to distance");
    if (tb > ta) n_further++;
    // the near tag passes a bound that the far tag misses
    auth(1, $urandom, 32'h0bad_f00d, 32'h0bad_f00d, ta - tb, t);
    // wrong key (impersonation)
    auth(0, $urandom, 32'h0123_4567, 32'h0123_4566, 0, t);
    auth(2, $urandom, 32'h0123_4567, 32'hffff_0000, 100, t);
    for (int i = 0; i < 4; i++) auth(i % NSYS, $urandom, 32'($urandom), 32'($urandom) | 1, 0, t);
    auth(0, $urandom, 32'h7777_1111, 32'h7777_1111, -1, t);
    chk(n_accept > 0, "an accepted tag");
    chk(n_wrong_key > 0, "a rejected wrong key");
    chk(n_too_far > 0, "a rejected distant tag");
    chk(n_further > 0, "a further tag measured longer");
    chk(n_answers > 0, "tag answers matching");
    $display("mechanisms: accepted=%0d wrong_key=%0d too_far=%0d further=%0d answers=%0d",
             n_accept, n_wrong_key, n_too_far, n_further, n_answers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
