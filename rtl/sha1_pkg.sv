// sha1_pkg: types and constants shared by the SHA-1 engines.
//
// A SHA-1 working state is five 32-bit words A..E (160 bits), held here as a packed
// struct with A in the most significant word, so that a state reads in the usual
// digest order H0..H4.  The initial hash value H0..H4 and the four round constants
// K1..K4 are the standard SHA-1 values.  The 80 rounds fall into four groups of 20;
// the group number selects both the round constant and the round function.
// block_m() is the round-word recurrence W_t = S^1(W_t-16 ^ W_t-14 ^ W_t-8 ^ W_t-3)
// applied to a 16-word window that holds W_t-16 at index 0 and W_t-1 at index 15.
package sha1_pkg;

  typedef logic [31:0] word_t;

  typedef struct packed {
    word_t a;
    word_t b;
    word_t c;
    word_t d;
    word_t e;
  } state_t;

  // Round group: 0 for rounds 0-19, 1 for 20-39, 2 for 40-59, 3 for 60-79.
  typedef logic [1:0] group_t;

  typedef word_t window_t [16];

  localparam state_t H_INIT = '{a: 32'h67452301, b: 32'hEFCDAB89, c: 32'h98BADCFE,
                                d: 32'h10325476, e: 32'hC3D2E1F0};

  localparam word_t K1 = 32'h5A827999;
  localparam word_t K2 = 32'h6ED9EBA1;
  localparam word_t K3 = 32'h8F1BBCDC;
  localparam word_t K4 = 32'hCA62C1D6;

  localparam int unsigned ROUNDS = 80;
  localparam int unsigned BLOCK_WORDS = 16;

  // Group of round t (0..79).
  function automatic group_t round_group(input logic [6:0] t);
    if (t < 7'd20)      return 2'd0;
    else if (t < 7'd40) return 2'd1;
    else if (t < 7'd60) return 2'd2;
    else                return 2'd3;
  endfunction

  // Circular left shift S^n.
  function automatic word_t rotl(input word_t x, input int unsigned n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // Block_M of the round-word unit: three XORs and a hard-wired S^1.
  function automatic word_t block_m(input window_t w);
    return rotl(w[0] ^ w[2] ^ w[8] ^ w[13], 1);
  endfunction

endpackage
