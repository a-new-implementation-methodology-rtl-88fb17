// tb_db_reader: plays the ring oscillator and an ideal tag towards the
// reader.
//
// reader_signal_in is a square wave of 2*HP clock cycles.  In the middle of
// each period (its rising edge) the testbench reads the bit the reader is
// sending, frames start bit, N_V and challenges as a tag would, and answers
// each challenge with R_i^{c_i} computed by the reference SHA-1 from its own
// key.  It checks the nonce and challenges against the reference random
// generator, the expected and received sequences, auth_ok, in_range and
// accept, and that the timer reads exactly N_BITS oscillator periods.
// Runs: matching key, a wrong key, and a time bound one cycle too small.
module tb_db_reader;
  import sha1_ref_pkg::*;
  localparam int NV = 13, N = 12, HP = 100, TW = 29;
  logic clk = 0, rst = 1, start = 0;
  logic [31:0] seed = 0, key = 0;
  logic [TW-1:0] time_bound = 0;
  logic reader_signal_in = 0, reader_data_out, reader_data_in = 0;
  logic busy, done, auth_ok, in_range, accept;
  logic [TW-1:0] timer;
  logic [5:0] dist_msb;
  logic [NV-1:0] nonce;
  logic [N-1:0] challenge, expected, received;
  logic [31:0] tag_key = 0;
  int checks = 0, failures = 0;

  db_reader dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // oscillator
  initial begin
    forever begin
      repeat (HP) @(negedge clk);
      reader_signal_in = ~reader_signal_in;
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // tag model driven from a clean event on the oscillator rising edge
  logic osc_q = 0;
  int   t_phase = 0, t_cnt = 0;
  logic [NV-1:0] t_nv;
  logic [63:0] t_r0, t_r1;
  always @(negedge clk) begin
    osc_q <= reader_signal_in;
    if (reader_signal_in && !osc_q) begin
      case (t_phase)
        0: if (reader_data_out) begin t_phase = 1; t_cnt = 0; end
        1: begin
          t_nv = {t_nv[NV-2:0], reader_data_out};
          t_cnt++;
          if (t_cnt == NV) begin
            r_split(64'(tag_key), 32, 64'(t_nv), NV, N, t_r0, t_r1);
            t_phase = 2; t_cnt = 0;
          end
        end
        default: begin
          reader_data_in = reader_data_out ? t_r1[N-1-t_cnt] : t_r0[N-1-t_cnt];
          t_cnt++;
          if (t_cnt == N) t_phase = 0;
        end
      endcase
    end
  end

  task automatic auth(input logic [31:0] s, input logic [31:0] kr, input logic [31:0] kt,
                      input int bound_delta, input logic exp_auth);
    logic [31:0] m;
    logic [NV-1:0] e_nv;
    logic [N-1:0] e_c, e_g;
    logic [63:0] r0, r1;
    int exp_t;
    m = (s == 0) ? 32'h1 : s;
    for (int i = 0; i < NV; i++) e_nv = {e_nv[NV-2:0], lfsr_next(m)};
    for (int i = 0; i < N; i++)  e_c  = {e_c[N-2:0], lfsr_next(m)};
    r_split(64'(kr), 32, 64'(e_nv), NV, N, r0, r1);
    for (int i = N - 1; i >= 0; i--) e_g[i] = e_c[i] ? r1[i] : r0[i];
    exp_t = N * 2 * HP;
    @(negedge clk);
    seed = s; key = kr; tag_key = kt;
    time_bound = TW'(exp_t + bound_delta);
    start = 1;
    @(negedge clk) start = 0;
    chk(busy, "busy after start");
    while (!done) @(negedge clk);
    chk(nonce === e_nv, $sformatf("nonce %h expected %h", nonce, e_nv));
    chk(challenge === e_c, $sformatf("challenge %h expected %h", challenge, e_c));
    chk(expected === e_g, $sformatf("G %h expected %h", expected, e_g));
    chk(auth_ok === exp_auth, $sformatf("auth_ok %b expected %b", auth_ok, exp_auth));
    if (exp_auth) chk(received === e_g, "Y equals G");
    chk(timer === TW'(exp_t), $sformatf("timer %0d expected %0d", timer, exp_t));
    chk(dist_msb === timer[TW-1 -: 6], "dist_msb");
    chk(in_range === (bound_delta >= 0), "in_range");
    chk(accept === (exp_auth && bound_delta >= 0), "accept");
    chk(!busy && reader_data_out === 0, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    auth(32'h1234_5678, 32'h0123_4567, 32'h0123_4567, 0, 1);
    auth($urandom, 32'hcafe_f00d, 32'hcafe_f00d, 1000, 1);
    auth($urandom, 32'hcafe_f00d, 32'hcafe_f00c, 0, 0);
    auth(32'h0, 32'h5555_aaaa, 32'h5555_aaaa, -1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
