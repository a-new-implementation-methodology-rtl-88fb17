// tb_db_prf: checks R0 and R1 against hand-computed SHA-1 values of K || N_V
// (45-bit messages) and against the reference model for random keys and
// nonces, at the default sizes and at K = 20, N_V = 9, n = 30 bits.
module tb_db_prf;
  import sha1_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [31:0] key;
  logic [12:0] nonce;
  logic [11:0] r0, r1;
  logic busy, done;
  logic [19:0] key_s;
  logic [8:0]  nonce_s;
  logic [29:0] r0_s, r1_s;
  logic busy_s, done_s;
  int checks = 0, failures = 0;

  db_prf dut (.*);
  db_prf #(.KEY_BITS(20), .NV_BITS(9), .N_BITS(30)) dut_s (
    .clk, .rst, .start, .key(key_s), .nonce(nonce_s), .busy(busy_s), .done(done_s),
    .r0(r0_s), .r1(r1_s));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [11:0] e0, input logic [11:0] e1,
                     input logic [29:0] f0, input logic [29:0] f1);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (r0 !== e0 || r1 !== e1) begin
      failures++; $display("FAIL K=%h Nv=%h: %h %h expected %h %h", key, nonce, r0, r1, e0, e1);
    end
    checks++;
    if (r0_s !== f0 || r1_s !== f1) begin
      failures++; $display("FAIL small K=%h Nv=%h", key_s, nonce_s);
    end
  endtask

  initial begin
    logic [63:0] a0, a1, b0, b1;
    key = 0; nonce = 0; key_s = 0; nonce_s = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    // fixed vectors, SHA-1 worked out by hand-checked script
    key = 32'h01234567; nonce = 13'h1abc;
    r_split(64'(key_s), 20, 64'(nonce_s), 9, 30, b0, b1);
    run(12'h1b3, 12'h787, 30'(b0), 30'(b1));
    key = 32'hdeadbeef; nonce = 13'h0001;
    run(12'h132, 12'h496, 30'(b0), 30'(b1));
    key = 32'h0; nonce = 13'h0;
    run(12'hd16, 12'haf6, 30'(b0), 30'(b1));
    for (int i = 0; i < 20; i++) begin
      key = $urandom; nonce = 13'($urandom);
      key_s = 20'($urandom); nonce_s = 9'($urandom);
      r_split(64'(key), 32, 64'(nonce), 13, 12, a0, a1);
      r_split(64'(key_s), 20, 64'(nonce_s), 9, 30, b0, b1);
      run(12'(a0), 12'(a1), 30'(b0), 30'(b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
