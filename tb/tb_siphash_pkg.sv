// tb_siphash_pkg: reference model of the PTAG function for the testbenches.
//
// A byte-oriented SipHash-2-4, written straight from the algorithm's
// definition (message bytes taken little-endian in 8-byte words, the last
// word carrying the length in its top byte), independent of the
// cycle-by-cycle hardware. self_test() checks it against the published test
// vector (key 00..0f, message 00..0e -> a129ca6149be45e5). ptag_ref()
// builds the 40-byte PTAG message: the 64-bit line address, then the line
// from bit 0 upwards, each 64-bit word little-endian.
package tb_siphash_pkg;

  function automatic logic [63:0] rotl(input logic [63:0] x, input int n);
    return (x << n) | (x >> (64 - n));
  endfunction

  function automatic void round_(ref logic [63:0] v0, v1, v2, v3);
    v0 += v1; v1 = rotl(v1, 13); v1 ^= v0; v0 = rotl(v0, 32);
    v2 += v3; v3 = rotl(v3, 16); v3 ^= v2;
    v0 += v3; v3 = rotl(v3, 21); v3 ^= v0;
    v2 += v1; v1 = rotl(v1, 17); v1 ^= v2; v2 = rotl(v2, 32);
  endfunction

  // k0/k1: the two key halves as read little-endian from the 16 key bytes
  function automatic logic [63:0] siphash24(input logic [63:0] k0, k1,
                                            input byte unsigned msg[$]);
    logic [63:0] v0, v1, v2, v3, m;
    int n, nw;
    v0 = k0 ^ 64'h736f6d6570736575;
    v1 = k1 ^ 64'h646f72616e646f6d;
    v2 = k0 ^ 64'h6c7967656e657261;
    v3 = k1 ^ 64'h7465646279746573;
    n  = msg.size();
    nw = n / 8;
    for (int w = 0; w <= nw; w++) begin
      m = '0;
      if (w < nw) begin
        for (int b = 0; b < 8; b++) m[8*b +: 8] = msg[8*w + b];
      end else begin
        for (int b = 0; b < n % 8; b++) m[8*b +: 8] = msg[8*w + b];
        m[63:56] = 8'(n);
      end
      v3 ^= m;
      round_(v0, v1, v2, v3);
      round_(v0, v1, v2, v3);
      v0 ^= m;
    end
    v2 ^= 64'hff;
    repeat (4) round_(v0, v1, v2, v3);
    return v0 ^ v1 ^ v2 ^ v3;
  endfunction

  function automatic bit self_test();
    byte unsigned msg[$];
    for (int i = 0; i < 15; i++) msg.push_back(byte'(i));
    return siphash24(64'h0706050403020100, 64'h0f0e0d0c0b0a0908, msg)
           == 64'ha129ca6149be45e5;
  endfunction

  function automatic logic [63:0] ptag_ref(input logic [127:0] key,
                                           input logic [63:0] addr,
                                           input logic [255:0] line);
    byte unsigned msg[$];
    for (int b = 0; b < 8; b++)  msg.push_back(addr[8*b +: 8]);
    for (int b = 0; b < 32; b++) msg.push_back(line[8*b +: 8]);
    return siphash24(key[63:0], key[127:64], msg);
  endfunction

  // Key derivation from the four fuzzy-extractor strings (r[0] = r1)
  function automatic logic [127:0] key_ref(input logic [3:0][63:0] r);
    logic [63:0] k1, k2;
    k1 = ptag_ref({r[3], r[2]}, 64'h1, {128'h0, r[1], r[0]});
    k2 = ptag_ref({r[1], r[0]}, 64'h2, {128'h0, r[3], r[2]});
    return {k2, k1};
  endfunction

endpackage
