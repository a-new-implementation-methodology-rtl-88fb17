// sha1_ref_pkg: reference model used by the testbenches.
//
// A plain behavioural SHA-1 of a bit string of up to 447 bits, written
// independently of the RTL (own padding, full 80-word schedule array), and
// the protocol's R0 || R1 split of h(K, N_V) and a model of the reader's
// random generator.  Checked against the published SHA-1 of "abc".
package sha1_ref_pkg;

  function automatic int unsigned rol(input int unsigned x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // SHA-1 of the low len bits of m (first message bit = m[len-1]).
  function automatic logic [159:0] sha1_bits(input logic [446:0] m, input int len);
    logic [511:0]  blk;
    int unsigned   w [80];
    int unsigned   h [5];
    int unsigned   a, b, c, d, e, f, k, tmp;
    blk = 512'(m) << (512 - len);
    blk[511 - len] = 1'b1;
    blk[63:0] = 64'(len);
    for (int i = 0; i < 16; i++) w[i] = blk[511 - 32*i -: 32];
    for (int i = 16; i < 80; i++) w[i] = rol(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    h = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
    {a, b, c, d, e} = {h[0], h[1], h[2], h[3], h[4]};
    for (int t = 0; t < 80; t++) begin
      if (t < 20)      begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
      else if (t < 40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
      else if (t < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
      else             begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
      tmp = rol(a, 5) + f + e + k + w[t];
      e = d; d = c; c = rol(b, 30); b = a; a = tmp;
    end
    return {h[0] + a, h[1] + b, h[2] + c, h[3] + d, h[4] + e};
  endfunction

  // R0 (first n bits) and R1 (next n bits) of h(K, N_V), K first.
  function automatic void r_split(input logic [63:0] key, input int kb,
                                  input logic [63:0] nv, input int nb, input int n,
                                  output logic [63:0] r0, output logic [63:0] r1);
    logic [446:0] m;
    logic [159:0] dg;
    m  = (447'(key) << nb) | 447'(nv & ((64'd1 << nb) - 1));
    dg = sha1_bits(m, kb + nb);
    r0 = 64'(dg >> (160 - n));
    r1 = 64'(dg >> (160 - 2*n)) & ((64'd1 << n) - 1);
  endfunction

  // Reader random generator: 32-bit Galois LFSR, x^32+x^22+x^2+x+1, one bit
  // per step taken from bit 0 before the step.
  function automatic logic lfsr_next(inout logic [31:0] s);
    logic b;
    b = s[0];
    s = s >> 1;
    if (b) s = s ^ 32'h80200003;
    return b;
  endfunction

endpackage
