// tb_lfsr: compares the generator with the reference model bit by bit for
// random seeds, checks that load takes the seed, that a zero seed becomes 1,
// and that the register holds when step is low.
module tb_lfsr;
  import sha1_ref_pkg::*;
  logic clk = 0, rst = 1, load = 0, step = 0;
  logic [31:0] seed = 0, state;
  logic bit_out;
  int checks = 0, failures = 0;

  lfsr dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m;
    logic b;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int s = 0; s < 8; s++) begin
      seed = (s == 0) ? 32'h0 : $urandom;
      load = 1;
      @(negedge clk) load = 0;
      m = (seed == 0) ? 32'h1 : seed;
      checks++;
      if (state !== m) begin failures++; $display("FAIL load %h -> %h", seed, state); end
      for (int i = 0; i < 300; i++) begin
        step = ($urandom_range(0, 3) != 0);
        b = m[0];
        checks++;
        if (bit_out !== b) begin failures++; $display("FAIL bit %0d", i); end
        if (step) void'(lfsr_next(m));
        @(negedge clk);
        checks++;
        if (state !== m) begin failures++; $display("FAIL state %h expected %h", state, m); end
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
