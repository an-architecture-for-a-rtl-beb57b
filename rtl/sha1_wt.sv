// sha1_wt: on-the-fly round-word computation for the iterative SHA-1 engine.
//
// A 16 x 32-bit shift register holds the last sixteen round words, W_t-16 in entry 0
// up to W_t-1 in entry 15.  Block_M (three XORs on entries 0, 2, 8 and 13 and a
// hard-wired one-place left rotation) forms W_t for t >= 16.  MPX_2 chooses what is
// shifted into entry 15: the padded message word during rounds 0-15, Block_M after.
// MPX_1 chooses the W_t output in the same way, so the message words go straight to
// the round unit while they are being loaded.  One word is produced per clock.
//
// Interface: when en is high the register shifts by one entry (entry j takes entry
// j+1, entry 15 takes the new word).  rnd_cn is high for rounds 0-15.  wt is
// combinational from the register and msg_word and is valid in the same cycle.
//
// The register size, the taps, the two multiplexers and the per-clock shift follow
// the document; the enable and the reset to zero are this design's own.
module sha1_wt
  import sha1_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  rnd_cn,
  input  word_t msg_word,
  output word_t wt
);

  window_t win;
  word_t   bm;

  assign bm = block_m(win);
  // MPX_1 and MPX_2 make the same choice; the shifted-in word is the output word.
  assign wt = rnd_cn ? msg_word : bm;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < 16; j++) win[j] <= '0;
    end else if (en) begin
      for (int j = 0; j < 15; j++) win[j] <= win[j+1];
      win[15] <= wt;
    end
  end

endmodule
