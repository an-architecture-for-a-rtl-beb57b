// sha1_pipe: pipelined SHA-1 engine with Q cascaded RSHA-1 stages.
//
// Stage s performs rounds s*R .. s*R+R-1 (R = 80/Q) of one 512-bit block, one round
// per clock, using the round constant and round function of each round's group and
// its own round-word unit (sha1_wt_pipe).  All stages step together: a common phase
// counter runs 0..R-1, and on its last value every stage hands its state A..E to
// the next stage's register, so a block enters every R cycles and leaves 80 cycles
// later.  Throughput is 160 bits per R cycles.
//
// Because the blocks of one message depend on each other through the chaining
// value, the Q blocks in flight belong to Q independent messages ("contexts"),
// served in a fixed rotation: slot n of stage 0 belongs to context n mod Q.  Two
// stacks of Q 160-bit entries hold the chaining values.  The input stack holds, per
// context, the chaining value its next block starts from.  The output stack moves
// along with the blocks and holds the chaining value each block started from, which
// the final addition after the last stage needs.  A block leaving the pipeline
// writes H + A..E back into its context's input-stack entry ("for next data block")
// just in time for that context's next slot; for the last block of a message the
// sum is also output as the digest and the context restarts from the initial value.
//
// Interface: slot_ctx names the context of the slot that starts at phase 0.  At
// phase 0 the engine takes a block if in_valid is high (in_last says whether it is
// the last block of its message); otherwise the slot stays empty.  A taken block's
// 16 padded words must follow on consecutive cycles (in_ready is high at phase 0 and,
// for a taken block, through phase 15).  out_valid pulses with out_ctx and the
// digest the cycle after the block's 80th round.
//
// From the document: the cascade of Q round cells with registers between them, Q
// round-word units with stage-to-stage transfer, the two stacks and the shared final
// adder.  This design's own: the context rotation, the handshake, empty slots and
// the final addition in the same cycle as the last round.
module sha1_pipe
  import sha1_pkg::*;
#(
  parameter int unsigned Q   = 4,
  parameter int unsigned BLK = 4,
  localparam int unsigned CW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  word_t         in_data,
  input  logic          in_last,
  output logic [CW-1:0] slot_ctx,
  output logic          out_valid,
  output logic [CW-1:0] out_ctx,
  output state_t        out_digest
);

  localparam int unsigned R = ROUNDS / Q;

  logic [6:0]    phase;
  logic [CW-1:0] sctx;

  // Per-stage pipeline registers.
  state_t        st    [Q];
  logic          v     [Q];
  logic [CW-1:0] ctxs  [Q];
  logic          lst   [Q];
  state_t        hb    [Q];     // output stack: chaining value each block started from

  // Input stack: per-context chaining value and "next block starts a message".
  state_t        hctx   [Q];
  logic          cfirst [Q];

  state_t        hin, hsum;
  state_t        sin  [Q];
  state_t        rout [Q];
  word_t         wt   [Q];
  word_t         kt   [Q];
  group_t        grp  [Q];
  logic          last_phase;

  assign slot_ctx   = sctx;
  assign last_phase = (phase == 7'(R - 1));
  assign hin        = cfirst[sctx] ? H_INIT : hctx[sctx];
  assign in_ready   = (phase == 7'd0) || (phase < 7'd16 && v[0]);

  sha1_wt_pipe #(.Q(Q)) u_wt (.clk(clk), .rst_n(rst_n), .phase(phase),
                              .msg_word(in_data), .wt(wt));

  for (genvar s = 0; s < Q; s++) begin : g_stage
    assign grp[s] = round_group(7'(s * R) + phase);
    assign sin[s] = (s == 0 && phase == 7'd0) ? hin : st[s];
    always_comb begin
      unique case (grp[s])
        2'd0:    kt[s] = K1;
        2'd1:    kt[s] = K2;
        2'd2:    kt[s] = K3;
        default: kt[s] = K4;
      endcase
    end
    rsha1 #(.BLK(BLK)) u_round (.s_in(sin[s]), .w(wt[s]), .k(kt[s]), .grp(grp[s]),
                                .s_out(rout[s]));
  end

  // Final addition after the last stage.
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_a (.a(hb[Q-1].a), .b(rout[Q-1].a), .s(hsum.a));
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_b (.a(hb[Q-1].b), .b(rout[Q-1].b), .s(hsum.b));
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_c (.a(hb[Q-1].c), .b(rout[Q-1].c), .s(hsum.c));
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_d (.a(hb[Q-1].d), .b(rout[Q-1].d), .s(hsum.d));
  bcla #(.WIDTH(32), .BLK(BLK)) u_add_e (.a(hb[Q-1].e), .b(rout[Q-1].e), .s(hsum.e));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= '0;
      sctx       <= '0;
      out_valid  <= 1'b0;
      out_ctx    <= '0;
      out_digest <= '0;
      for (int s = 0; s < Q; s++) begin
        st[s]     <= '0;
        v[s]      <= 1'b0;
        ctxs[s]   <= '0;
        lst[s]    <= 1'b0;
        hb[s]     <= '0;
        hctx[s]   <= H_INIT;
        cfirst[s] <= 1'b1;
      end
    end else begin
      out_valid <= 1'b0;
      phase     <= last_phase ? 7'd0 : phase + 7'd1;

      // Rounds, and the hand-over between stages on the last phase.
      for (int s = 0; s < Q; s++) begin
        if (s > 0 && last_phase) begin
          st[s]   <= rout[s-1];
          v[s]    <= v[s-1];
          ctxs[s] <= ctxs[s-1];
          lst[s]  <= lst[s-1];
          hb[s]   <= hb[s-1];
        end else begin
          st[s] <= rout[s];
        end
      end

      // A block enters stage 0 at phase 0.
      if (phase == 7'd0) begin
        v[0]    <= in_valid;
        ctxs[0] <= sctx;
        lst[0]  <= in_last;
        hb[0]   <= hin;
        if (in_valid) cfirst[sctx] <= 1'b0;
      end

      if (last_phase) begin
        sctx <= (sctx == CW'(Q - 1)) ? '0 : CW'(sctx + 1'b1);
        // A block leaves the last stage: update its context, output a digest.
        if (v[Q-1]) begin
          hctx[ctxs[Q-1]]   <= hsum;
          cfirst[ctxs[Q-1]] <= lst[Q-1];
          if (lst[Q-1]) begin
            out_valid  <= 1'b1;
            out_ctx    <= ctxs[Q-1];
            out_digest <= hsum;
          end
        end
      end
    end
  end

  // A taken block's words arrive without gaps.
  a_no_gap: assert property (@(posedge clk) disable iff (!rst_n)
    (v[0] && phase > 7'd0 && phase < 7'd16) |-> in_valid);

endmodule
