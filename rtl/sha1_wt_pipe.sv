// sha1_wt_pipe: round-word computation for the Q-stage pipelined SHA-1 engine.
//
// Every pipeline stage has its own 16 x 32-bit round-word register and Block_M,
// organised as in sha1_wt: entry 0 holds W_t-16 and entry 15 holds W_t-1, and each
// clock the register shifts by one entry and takes the new word into entry 15.
// Stage 0 takes the padded message words during its first 16 rounds.  All stages
// work on R = 80/Q rounds per block.  On the last clock of a stage period the
// shifted window of stage s is written into stage s+1 instead of back into stage s
// (entry j of stage s+1 takes entry j+1 of stage s, entry 15 takes the word stage s
// has just produced), so stage s+1 starts its first round with W_t-16..W_t-1
// already in place.  The window leaving the last stage is dropped.
//
// Interface: phase is the round number within the stage period (0..R-1), common to
// all stages.  wt[s] is the round word for stage s in the current cycle,
// combinational from the registers (and from msg_word for stage 0, rounds 0-15).
//
// The per-stage registers and the diagonal stage-to-stage transfer follow the
// document's data-transfer arrangement and its table of register contents; the
// common phase counter is this design's own.  The transfer needs at least 16
// rounds per stage (Q <= 5), as the document recommends.
module sha1_wt_pipe
  import sha1_pkg::*;
#(
  parameter int unsigned Q = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] phase,
  input  word_t      msg_word,
  output word_t      wt [Q]
);

  localparam int unsigned R = ROUNDS / Q;

  if ((ROUNDS % Q) != 0 || R < BLOCK_WORDS) begin : g_bad_q
    $error("sha1_wt_pipe: Q must divide 80 and give at least 16 rounds per stage");
  end

  window_t win [Q];

  always_comb begin
    for (int s = 0; s < Q; s++)
      wt[s] = (s == 0 && phase < 7'd16) ? msg_word : block_m(win[s]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < Q; s++)
        for (int j = 0; j < 16; j++) win[s][j] <= '0;
    end else begin
      for (int s = 0; s < Q; s++) begin
        if (s > 0 && phase == 7'(R - 1)) begin
          for (int j = 0; j < 15; j++) win[s][j] <= win[s-1][j+1];
          win[s][15] <= wt[s-1];
        end else begin
          for (int j = 0; j < 15; j++) win[s][j] <= win[s][j+1];
          win[s][15] <= wt[s];
        end
      end
    end
  end

endmodule
