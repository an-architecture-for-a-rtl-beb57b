// sha1_f: the SHA-1 round function f(B,C,D) for all four round groups.
//
//   group 0 (rounds  0-19): (B & C) | (~B & D)          choose
//   group 1 (rounds 20-39): B ^ C ^ D                    parity
//   group 2 (rounds 40-59): (B & C) | (B & D) | (C & D)  majority
//   group 3 (rounds 60-79): B ^ C ^ D                    parity
//
// The structure shares gates between the groups: one XOR chain serves both parity
// groups, and the choose and majority terms share the AND of B and C.  A small
// multiplexer (r1) feeds either ~B or B to the AND with D, so the same AND gate gives
// ~B&D for the choose function and B&D for the majority; a third AND gives C&D.  A
// two-input OR forms the choose result and a three-input OR the majority.  The
// output multiplexer (rd_sel, driven by the round group) picks one of the three.
//
// Interface: purely combinational; 32-bit words, 2-bit round group.
//
// The gate kinds (AND, OR, XOR, inverter, the R1 and Rd_sel multiplexers) follow the
// document's drawing of this function; the exact wiring between them is this
// design's reading of that drawing.
module sha1_f
  import sha1_pkg::*;
(
  input  word_t  b,
  input  word_t  c,
  input  word_t  d,
  input  group_t grp,
  output word_t  f
);

  word_t bx;        // R1 output: ~B for the choose group, B otherwise
  word_t and_bc, and_xd, and_cd;
  word_t par, ch, maj;

  always_comb begin
    bx     = (grp == 2'd0) ? ~b : b;
    and_bc = b & c;
    and_xd = bx & d;
    and_cd = c & d;
    par    = (b ^ c) ^ d;
    ch     = and_bc | and_xd;
    maj    = and_bc | and_xd | and_cd;
    unique case (grp)
      2'd0:    f = ch;
      2'd2:    f = maj;
      default: f = par;
    endcase
  end

endmodule
