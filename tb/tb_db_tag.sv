// tb_db_tag: plays the reader and the two channels towards the tag.
//
// It drives tag_signal_in as a square wave (HP clock cycles per half period)
// and puts one bit on tag_data_in at each rising edge: some idle zeros, the
// start bit, N_V and the challenges.  During each challenge it checks the
// answer against R0/R1 from the reference SHA-1, and flips tag_data_in for
// a moment to check that the answer follows the challenge line without a
// clock edge.  Afterwards it checks the received nonce and challenges, the
// done pulse, the loop-back of the oscillator, and that the tag is back in
// its idle state for a second authentication with another key.
module tb_db_tag;
  import sha1_ref_pkg::*;
  localparam int NV = 13, N = 12, HP = 120;
  logic clk = 0, rst = 1;
  logic [31:0] key;
  logic tag_signal_in = 0, tag_signal_out, tag_data_in = 0, tag_data_out;
  logic [NV-1:0] received_nv;
  logic [N-1:0]  received_c, package_r0, package_r1;
  logic answering, done;
  int checks = 0, failures = 0, dones = 0;

  db_tag dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // one oscillator period carrying bit b; returns nothing
  task automatic period(input logic b);
    @(negedge clk);
    tag_signal_in = 1; tag_data_in = b;
    repeat (HP) begin
      @(negedge clk);
      chk(tag_signal_out === tag_signal_in, "loop-back");
    end
    tag_signal_in = 0;
    repeat (HP - 1) @(negedge clk);
  endtask

  task automatic auth(input logic [31:0] k, input logic [NV-1:0] nv, input logic [N-1:0] c);
    logic [63:0] r0, r1;
    int d0;
    key = k;
    r_split(64'(k), 32, 64'(nv), NV, N, r0, r1);
    d0 = dones;
    period(0); period(0);
    chk(!answering, "idle before start bit");
    period(1);
    for (int i = NV - 1; i >= 0; i--) period(nv[i]);
    for (int i = N - 1; i >= 0; i--) begin
      @(negedge clk);
      tag_signal_in = 1; tag_data_in = c[i];
      repeat (HP / 2) @(negedge clk);
      chk(answering, "answering");
      chk(tag_data_out === (c[i] ? r1[i] : r0[i]), $sformatf("answer %0d", N - i));
      // the answer must follow the challenge line at once
      tag_data_in = !c[i];
      #1;
      chk(tag_data_out === (!c[i] ? r1[i] : r0[i]), $sformatf("async answer %0d", N - i));
      tag_data_in = c[i];
      #1;
      repeat (HP / 2) @(negedge clk);
      tag_signal_in = 0;
      repeat (HP - 1) @(negedge clk);
    end
    period(0);
    chk(received_nv === nv, $sformatf("nonce %h expected %h", received_nv, nv));
    chk(received_c === c, $sformatf("challenges %h expected %h", received_c, c));
    chk(dones == d0 + 1, "one done pulse");
    chk(!answering && tag_data_out === 0, "idle after challenges");
  endtask

  initial begin
    key = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    auth(32'h01234567, 13'h1abc, 12'b010011010110);
    auth($urandom, 13'($urandom), 12'($urandom));
    auth($urandom, 13'h0000, 12'hfff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
