// sha1_pad: SHA-1 message padding on a stream of 32-bit words.
//
// The message arrives most significant bit first, one 32-bit word per transfer.
// The final word carries in_last and, in in_nbits (0..32), how many of its leading
// bits belong to the message.  The unit forwards the message words, clears the
// unused bits of the final word and sets the bit right after the message to 1, then
// emits zero words until the word position within the 512-bit block is 14, and ends
// with the 64-bit message length in bits (high word, then low word).  When the 1 bit
// does not fit before the length field, the zeros run on into one more block.  If
// the final word is full, the 1 bit goes into a word of its own (0x80000000).
//
// Interface: valid/ready on both sides.  Message words pass through combinationally
// (out_valid = in_valid, in_ready = out_ready) while the message lasts; during the
// padding words in_ready is low.  out_last marks the last word (the low length word)
// of the last block.  The length counter is 64 bits wide.
//
// The padding rule is the document's; the stream interface, the in_nbits encoding
// and the bit-level granularity are this design's own.
module sha1_pad
  import sha1_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  word_t      in_data,
  input  logic       in_last,
  input  logic [5:0] in_nbits,
  output logic       out_valid,
  input  logic       out_ready,
  output word_t      out_data,
  output logic       out_last
);

  typedef enum logic [2:0] {S_MSG, S_ONE, S_ZERO, S_LENHI, S_LENLO} pstate_t;

  pstate_t     state, state_nx;
  logic [3:0]  widx;     // position of the next output word in its 512-bit block
  logic [63:0] len;      // message bits seen so far
  logic [63:0] len_nx;
  logic        fire;

  word_t keep_mask, one_bit;

  always_comb begin
    // Leading in_nbits bits kept, the bit after them set.
    keep_mask = (in_nbits >= 6'd32) ? 32'hFFFF_FFFF : ~(32'hFFFF_FFFF >> in_nbits);
    one_bit   = (in_nbits >= 6'd32) ? 32'h0 : (32'h8000_0000 >> in_nbits);
  end

  always_comb begin
    out_valid = 1'b1;
    in_ready  = 1'b0;
    out_data  = '0;
    out_last  = 1'b0;
    unique case (state)
      S_MSG: begin
        out_valid = in_valid;
        in_ready  = out_ready;
        out_data  = in_last ? ((in_data & keep_mask) | one_bit) : in_data;
      end
      S_ONE:   out_data = 32'h8000_0000;
      S_ZERO:  out_data = '0;
      S_LENHI: out_data = len[63:32];
      S_LENLO: begin
        out_data = len[31:0];
        out_last = 1'b1;
      end
      default: out_valid = 1'b0;
    endcase
  end

  assign fire = out_valid && out_ready;

  always_comb begin
    state_nx = state;
    len_nx   = len;
    unique case (state)
      S_MSG: begin
        len_nx = len + (in_last ? 64'(in_nbits > 6'd32 ? 6'd32 : in_nbits) : 64'd32);
        if (in_last)
          state_nx = (in_nbits >= 6'd32) ? S_ONE : ((widx == 4'd13) ? S_LENHI : S_ZERO);
      end
      S_ONE, S_ZERO: state_nx = (widx == 4'd13) ? S_LENHI : S_ZERO;
      S_LENHI:       state_nx = S_LENLO;
      S_LENLO: begin
        state_nx = S_MSG;
        len_nx   = '0;
      end
      default:       state_nx = S_MSG;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_MSG;
      widx  <= '0;
      len   <= '0;
    end else if (fire) begin
      state <= state_nx;
      widx  <= widx + 4'd1;
      len   <= len_nx;
    end
  end

  // The length field always lands in words 14 and 15 of a block.
  a_len_pos: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LENLO) |-> (widx == 4'd15));

endmodule
