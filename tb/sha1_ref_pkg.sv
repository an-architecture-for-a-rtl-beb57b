// sha1_ref_pkg: reference model of SHA-1 for the testbenches.
//
// A plain, loop-based software model written straight from the SHA-1 definition,
// sharing no code with the RTL: message padding on a bit string held as 32-bit
// words, the 80-word message schedule, the compression of one 512-bit block and
// the hash of a whole message.  Digests are 160-bit values with H0 in the top word.
package sha1_ref_pkg;

  typedef logic [31:0] rword_t;
  typedef rword_t      rwords_t [$];

  function automatic rword_t rol(rword_t x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Message schedule W_0..W_79 of one block.
  function automatic void schedule(input rword_t blk [16], output rword_t w [80]);
    for (int t = 0; t < 80; t++)
      w[t] = (t < 16) ? blk[t] : rol(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
  endfunction

  function automatic rword_t f_ref(int t, rword_t b, rword_t c, rword_t d);
    if (t < 20)      return (b & c) | (~b & d);
    else if (t < 40) return b ^ c ^ d;
    else if (t < 60) return (b & c) | (b & d) | (c & d);
    else             return b ^ c ^ d;
  endfunction

  function automatic rword_t k_ref(int t);
    if (t < 20)      return 32'h5A827999;
    else if (t < 40) return 32'h6ED9EBA1;
    else if (t < 60) return 32'h8F1BBCDC;
    else             return 32'hCA62C1D6;
  endfunction

  // One round on a 160-bit state {A,B,C,D,E}.
  function automatic logic [159:0] round_ref(logic [159:0] s, int t, rword_t w);
    rword_t a, b, c, d, e, tmp;
    {a, b, c, d, e} = s;
    tmp = rol(a, 5) + f_ref(t, b, c, d) + e + w + k_ref(t);
    return {tmp, a, rol(b, 30), c, d};
  endfunction

  function automatic logic [159:0] compress(logic [159:0] h, rword_t blk [16]);
    rword_t w [80];
    logic [159:0] s;
    schedule(blk, w);
    s = h;
    for (int t = 0; t < 80; t++) s = round_ref(s, t, w[t]);
    return {h[159:128] + s[159:128], h[127:96] + s[127:96], h[95:64] + s[95:64],
            h[63:32] + s[63:32], h[31:0] + s[31:0]};
  endfunction

  // Pad a message of nbits bits, stored MSB-first in msg (unused bits ignored).
  function automatic rwords_t pad(rwords_t msg, longint unsigned nbits);
    rwords_t p;
    int nw, nb;
    nw = int'((nbits + 64 + 1 + 511) / 512) * 16;
    for (int i = 0; i < nw; i++) p.push_back('0);
    for (int i = 0; i < int'(nbits); i++) begin
      rword_t src;
      src = msg[i/32];
      if (src[31 - (i%32)]) p[i/32] = p[i/32] | (32'h8000_0000 >> (i%32));
    end
    nb = int'(nbits);
    p[nb/32] = p[nb/32] | (32'h8000_0000 >> (nb%32));
    p[nw-2] = rword_t'(nbits >> 32);
    p[nw-1] = rword_t'(nbits);
    return p;
  endfunction

  function automatic logic [159:0] hash_padded(rwords_t p);
    logic [159:0] h;
    rword_t blk [16];
    h = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;
    for (int b = 0; b < p.size() / 16; b++) begin
      for (int i = 0; i < 16; i++) blk[i] = p[16*b + i];
      h = compress(h, blk);
    end
    return h;
  endfunction

  function automatic logic [159:0] hash(rwords_t msg, longint unsigned nbits);
    return hash_padded(pad(msg, nbits));
  endfunction

endpackage
