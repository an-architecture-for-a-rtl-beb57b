// rsha1: one SHA-1 round (the RSHA-1 cell), purely combinational.
//
//   A' = S^5(A) + f(B,C,D) + E + W_t + K_t
//   B' = A,  C' = S^30(B),  D' = C,  E' = D
//
// The five-operand sum is split over four BCLA adders so that the slow terms are
// added late: BCLA_1 forms W_t + K_t, BCLA_2 adds E, BCLA_3 adds S^5(A) to f(B,C,D)
// in parallel with those, and BCLA_4 adds the two partial sums.  The rotations are
// plain wiring (S^30 is drawn as a right rotation by 2), and B', D' and E' are the
// inputs A, C and D passed straight through, so only A' costs logic.
//
// Interface: s_in is the state A..E before round t, w and k the round word and round
// constant, grp the round group (selects f); s_out is the state after the round.
// The adder tree and the rotation-as-wiring follow the document's round diagram.
module rsha1
  import sha1_pkg::*;
#(
  parameter int unsigned BLK = 4
) (
  input  state_t s_in,
  input  word_t  w,
  input  word_t  k,
  input  group_t grp,
  output state_t s_out
);

  word_t f, wk, ewk, af, sum;

  sha1_f u_f (.b(s_in.b), .c(s_in.c), .d(s_in.d), .grp(grp), .f(f));

  bcla #(.WIDTH(32), .BLK(BLK)) u_bcla1 (.a(w),                  .b(k),   .s(wk));
  bcla #(.WIDTH(32), .BLK(BLK)) u_bcla2 (.a(s_in.e),             .b(wk),  .s(ewk));
  bcla #(.WIDTH(32), .BLK(BLK)) u_bcla3 (.a(rotl(s_in.a, 5)),    .b(f),   .s(af));
  bcla #(.WIDTH(32), .BLK(BLK)) u_bcla4 (.a(af),                 .b(ewk), .s(sum));

  assign s_out = '{a: sum, b: s_in.a, c: rotl(s_in.b, 30), d: s_in.c, e: s_in.d};

endmodule
