// Reference model of the IDEA block cipher for the testbenches, written
// from the cipher's definition: key schedule (eight 16-bit subkeys per
// 25-bit left rotation of the 128-bit key), decryption subkeys (inverses
// mod 2^16+1 and mod 2^16), and the 8-round transform with the output
// transform. Also packs a 52-subkey set into the nine 96-bit RAM words the
// engine reads: word r = {K1..K6} of round r, word 8 = {K49..K52, 32'h0}.
package idea_ref_pkg;

  typedef logic [15:0] key52_t [52];

  function automatic logic [15:0] mulm(input logic [15:0] a, input logic [15:0] b);
    longint unsigned aa, bb, r;
    aa = (a == 0) ? 65536 : longint'(a);
    bb = (b == 0) ? 65536 : longint'(b);
    r  = (aa * bb) % 65537;
    return (r == 65536) ? 16'd0 : 16'(r);
  endfunction

  function automatic logic [15:0] inv(input logic [15:0] x);
    logic [15:0] r, base;
    int unsigned ex;
    r = 16'd1; base = x; ex = 65535;   // x^(p-2) mod p
    while (ex != 0) begin
      if (ex[0]) r = mulm(r, base);
      base = mulm(base, base);
      ex >>= 1;
    end
    return r;
  endfunction

  function automatic key52_t enc_keys(input logic [127:0] key);
    key52_t z;
    logic [127:0] k;
    k = key;
    for (int i = 0; i < 52; i++) begin
      z[i] = k[127 - 16 * (i % 8) -: 16];
      if (i % 8 == 7) k = {k[102:0], k[127:103]};
    end
    return z;
  endfunction

  function automatic key52_t dec_keys(input key52_t e);
    key52_t d;
    d[0] = inv(e[48]); d[1] = -e[49]; d[2] = -e[50]; d[3] = inv(e[51]);
    d[4] = e[46]; d[5] = e[47];
    for (int r = 1; r < 8; r++) begin
      int b;
      b = 48 - 6 * r;
      d[6*r]   = inv(e[b]);
      d[6*r+1] = -e[b+2];
      d[6*r+2] = -e[b+1];
      d[6*r+3] = inv(e[b+3]);
      d[6*r+4] = e[b-2];
      d[6*r+5] = e[b-1];
    end
    d[48] = inv(e[0]); d[49] = -e[1]; d[50] = -e[2]; d[51] = inv(e[3]);
    return d;
  endfunction

  function automatic logic [63:0] cipher(input logic [63:0] blk, input key52_t z);
    logic [15:0] x1, x2, x3, x4, s1, s2, s3, s4, s5, s6, s7, s8, s9, s10;
    {x1, x2, x3, x4} = blk;
    for (int r = 0; r < 8; r++) begin
      s1  = mulm(x1, z[6*r]);
      s2  = x2 + z[6*r+1];
      s3  = x3 + z[6*r+2];
      s4  = mulm(x4, z[6*r+3]);
      s5  = s1 ^ s3;
      s6  = s2 ^ s4;
      s7  = mulm(s5, z[6*r+4]);
      s8  = s6 + s7;
      s9  = mulm(s8, z[6*r+5]);
      s10 = s7 + s9;
      x1 = s1 ^ s9;
      x2 = s3 ^ s9;    // inner blocks swapped
      x3 = s2 ^ s10;
      x4 = s4 ^ s10;
    end
    return {mulm(x1, z[48]), x3 + z[49], x2 + z[50], mulm(x4, z[51])};
  endfunction

  function automatic logic [95:0] key_word(input key52_t z, input int w);
    if (w < 8) return {z[6*w], z[6*w+1], z[6*w+2], z[6*w+3], z[6*w+4], z[6*w+5]};
    else       return {z[48], z[49], z[50], z[51], 32'd0};
  endfunction

endpackage
