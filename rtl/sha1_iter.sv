// sha1_iter: compact iterative SHA-1 engine built around a single RSHA-1 round cell.
//
// Each 512-bit block takes 80 clock cycles, one round per cycle.  A round counter t
// runs 0..79.  In round 0 the input multiplexer in front of the round cell takes the
// chaining value H (the standard initial value for the first block of a message),
// otherwise it takes the registered state A..E fed back from the round cell.  The
// round words come from sha1_wt, which passes the 16 message words through during
// rounds 0-15 and computes the rest on the fly.  The four round constants are
// selected by the round group.  In round 79 the final addition H + A..E (five 32-bit
// BCLA adders) is done in the same cycle as the round, and the result becomes the
// chaining value of the next block; when the block was the last of its message the
// output multiplexer also presents it as the digest.
//
// Interface: w_valid/w_ready transfer one padded message word per cycle while
// t < 16 (w_ready is high exactly then).  If no word is offered the engine stalls in
// that round.  w_last marks word 15 of a message's last block.  digest_valid pulses
// for one cycle with the 160-bit digest (H0 in the top word); the digest appears the
// cycle after round 79, 80 cycles after word 0 was taken when words come without
// gaps.  With words always available a new block starts every 80 cycles, so the
// throughput is 160 bits per 80 cycles as the document states for one round cell.
//
// From the document: the single round cell used 80 times, the 160-bit state and
// chaining paths, the four K_t values, the final adder and output multiplexer.  This
// design's own: the handshake, the stall, doing the final addition inside round 79
// and holding K_t as constants rather than loadable registers.
module sha1_iter
  import sha1_pkg::*;
#(
  parameter int unsigned BLK = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   w_valid,
  output logic   w_ready,
  input  word_t  w_data,
  input  logic   w_last,
  output logic   digest_valid,
  output state_t digest,
  output logic   busy
);

  logic [6:0] t;
  logic       first;     // next block starts a new message
  logic       lastb;     // current block is the last of its message
  state_t     st, h, h_sel, s_in, rout, hsum;
  word_t      wt, kt;
  group_t     grp;
  logic       adv;

  assign h_sel   = first ? H_INIT : h;
  assign s_in    = (t == 7'd0) ? h_sel : st;          // input MPX
  assign grp     = round_group(t);
  assign w_ready = (t < 7'd16);
  assign adv     = (t < 7'd16) ? w_valid : 1'b1;
  assign busy    = (t != 7'd0);

  always_comb begin
    unique case (grp)
      2'd0:    kt = K1;
      2'd1:    kt = K2;
      2'd2:    kt = K3;
      default: kt = K4;
    endcase
  end

  sha1_wt u_wt (.clk(clk), .rst_n(rst_n), .en(adv), .rnd_cn(t < 7'd16),
                .msg_word(w_data), .wt(wt));

  rsha1 #(.BLK(BLK)) u_round (.s_in(s_in), .w(wt), .k(kt), .grp(grp), .s_out(rout));

  // Final addition H + A..E.
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_a (.a(h.a), .b(rout.a), .s(hsum.a));
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_b (.a(h.b), .b(rout.b), .s(hsum.b));
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_c (.a(h.c), .b(rout.c), .s(hsum.c));
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_d (.a(h.d), .b(rout.d), .s(hsum.d));
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_e (.a(h.e), .b(rout.e), .s(hsum.e));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t            <= '0;
      first        <= 1'b1;
      lastb        <= 1'b0;
      st           <= '0;
      h            <= H_INIT;
      digest_valid <= 1'b0;
      digest       <= '0;
    end else begin
      digest_valid <= 1'b0;
      if (adv) begin
        st <= rout;
        if (t == 7'd0) begin
          h     <= h_sel;
          first <= 1'b0;
        end
        if (t == 7'd15) lastb <= w_last;
        if (t == 7'd79) begin
          t <= '0;
          h <= hsum;
          if (lastb) begin
            digest       <= hsum;       // output MPX: digest
            digest_valid <= 1'b1;
            first        <= 1'b1;
          end
        end else begin
          t <= t + 7'd1;
        end
      end
    end
  end

  a_last_pos: assert property (@(posedge clk) disable iff (!rst_n)
    (w_valid && w_ready && w_last) |-> (t == 7'd15));

endmodule
