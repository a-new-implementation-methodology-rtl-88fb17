// sha1_core: SHA-1 compression of one 512-bit message block (FIPS 180-4).
//
// The reader and the tag each hold a "SHA" unit that computes h(K, N_V).
// The document names the unit only; this design uses SHA-1 on a single,
// already padded block, with the standard initial hash value, so the digest
// is the SHA-1 of any message of up to 447 bits.
//
// It works one round per clock: the five working words a..e and a 16-word
// window of the message schedule are registered; in round t the window's
// oldest word is W[t] and W[t+16] = rotl1(W[t+13]^W[t+8]^W[t+2]^W[t]) is
// shifted in.  After 80 rounds the initial hash value is added.
//
// Interface: pulse start with block valid (ignored while busy).  busy is high
// for 80 cycles; on the next cycle done pulses for one cycle and digest
// (big-endian, H0 in bits 159:128) holds until the next start.
// Latency: start sampled at edge 0, done high after edge 81.
module sha1_core (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [511:0] block,
  output logic         busy,
  output logic         done,
  output logic [159:0] digest
);
  localparam logic [31:0] H0 = 32'h6745_2301;
  localparam logic [31:0] H1 = 32'hEFCD_AB89;
  localparam logic [31:0] H2 = 32'h98BA_DCFE;
  localparam logic [31:0] H3 = 32'h1032_5476;
  localparam logic [31:0] H4 = 32'hC3D2_E1F0;

  logic [31:0] a, b, c, d, e;
  logic [31:0] w [16];
  logic [6:0]  t;
  logic        fin;   // the 80 rounds are over, add the initial value

  logic [31:0] f, k, temp, w_next;

  always_comb begin
    if (t < 7'd20) begin
      f = (b & c) | (~b & d);
      k = 32'h5A82_7999;
    end else if (t < 7'd40) begin
      f = b ^ c ^ d;
      k = 32'h6ED9_EBA1;
    end else if (t < 7'd60) begin
      f = (b & c) | (b & d) | (c & d);
      k = 32'h8F1B_BCDC;
    end else begin
      f = b ^ c ^ d;
      k = 32'hCA62_C1D6;
    end
    temp   = {a[26:0], a[31:27]} + f + e + k + w[0];
    w_next = w[13] ^ w[8] ^ w[2] ^ w[0];
    w_next = {w_next[30:0], w_next[31]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      fin    <= 1'b0;
      t      <= '0;
      digest <= '0;
      {a, b, c, d, e} <= '0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        t    <= '0;
        {a, b, c, d, e} <= {H0, H1, H2, H3, H4};
        for (int i = 0; i < 16; i++) w[i] <= block[511-32*i -: 32];
      end else if (busy) begin
        e <= d;
        d <= c;
        c <= {b[1:0], b[31:2]};
        b <= a;
        a <= temp;
        for (int i = 0; i < 15; i++) w[i] <= w[i+1];
        w[15] <= w_next;
        t <= t + 1'b1;
        if (t == 7'd79) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
      end
      if (fin) begin
        digest <= {a + H0, b + H1, c + H2, d + H3, e + H4};
        done   <= 1'b1;
      end
    end
  end
endmodule
