// sha1_top: the two SHA-1 engines side by side.
//
// The compact engine is the message padder followed by the iterative engine: a
// message enters as a stream of 32-bit words, is padded to whole 512-bit blocks,
// and the digest comes out 80 cycles per block later.  The high-throughput engine
// is the Q-stage pipeline, which takes already padded blocks of Q interleaved
// messages and delivers one block result every 80/Q cycles.  The two share no
// signals; each has its own ports, prefixed it_ and pp_.
//
// Interface: it_* is the message stream of the compact engine (see sha1_pad) and its
// digest (see sha1_iter).  pp_* is the padded-block interface of the pipeline (see
// sha1_pipe).  Digests are 160 bits with H0 in the top word.
module sha1_top
  import sha1_pkg::*;
#(
  parameter int unsigned Q   = 4,
  parameter int unsigned BLK = 4,
  localparam int unsigned CW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // Compact engine: message in, digest out.
  input  logic          it_valid,
  output logic          it_ready,
  input  word_t         it_data,
  input  logic          it_last,
  input  logic [5:0]    it_nbits,
  output logic          it_digest_valid,
  output state_t        it_digest,
  output logic          it_busy,
  // Pipelined engine: padded blocks in, digests out.
  input  logic          pp_valid,
  output logic          pp_ready,
  input  word_t         pp_data,
  input  logic          pp_last,
  output logic [CW-1:0] pp_slot_ctx,
  output logic          pp_digest_valid,
  output logic [CW-1:0] pp_digest_ctx,
  output state_t        pp_digest
);

  logic  pw_valid, pw_ready, pw_last;
  word_t pw_data;

  sha1_pad u_pad (
    .clk(clk), .rst_n(rst_n),
    .in_valid(it_valid), .in_ready(it_ready), .in_data(it_data),
    .in_last(it_last), .in_nbits(it_nbits),
    .out_valid(pw_valid), .out_ready(pw_ready), .out_data(pw_data), .out_last(pw_last)
  );

  sha1_iter #(.BLK(BLK)) u_iter (
    .clk(clk), .rst_n(rst_n),
    .w_valid(pw_valid), .w_ready(pw_ready), .w_data(pw_data), .w_last(pw_last),
    .digest_valid(it_digest_valid), .digest(it_digest), .busy(it_busy)
  );

  sha1_pipe #(.Q(Q), .BLK(BLK)) u_pipe (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pp_valid), .in_ready(pp_ready), .in_data(pp_data), .in_last(pp_last),
    .slot_ctx(pp_slot_ctx),
    .out_valid(pp_digest_valid), .out_ctx(pp_digest_ctx), .out_digest(pp_digest)
  );

endmodule
