// sha1_pipe_env: test environment for one pipelined engine of Q stages; it runs
// Q interleaved message streams through the engine.
// Each context hashes a sequence of messages of random length (one or more blocks);
// in a first phase every slot is filled, in a second phase slots are left empty at
// random.  Every digest is compared with the reference model and with the context
// it belongs to, and must appear exactly 80 cycles after its last block entered.
// In the first 12 slots a block is offered in every slot, and the engine must take
// each of them (one block per 80/Q cycles, Q blocks in flight).
// Interface: checks and failures count up as the test runs; finished goes high
// when every expected digest has been seen (or the slot budget is used up).
module sha1_pipe_env
  import sha1_pkg::*;
  import sha1_ref_pkg::*;
#(
  parameter int Q = 4
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int R = 80 / Q;
  localparam int CW = (Q > 1) ? $clog2(Q) : 1;
  localparam int NMSG = 5;           // messages per context

  logic          in_valid = 0, in_ready, in_last = 0, out_valid;
  word_t         in_data = '0;
  logic [CW-1:0] slot_ctx, out_ctx;
  state_t        out_digest;
  int bubbles = 0, taken = 0, done = 0, full_slots = 0;
  longint cyc = 0;

  rwords_t      blocks  [Q];         // padded words still to send, per context
  int           msg_end [Q][$];      // word index (exclusive) where each message ends
  logic [159:0] expd    [Q][$];      // expected digests, per context
  longint       t_last  [Q][$];      // entry cycle of each message's last block
  int           sent    [Q];

  sha1_pipe #(.Q(Q)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                          .in_ready(in_ready), .in_data(in_data), .in_last(in_last),
                          .slot_ctx(slot_ctx), .out_valid(out_valid), .out_ctx(out_ctx),
                          .out_digest(out_digest));

  always @(posedge clk) cyc <= cyc + 1;

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 2;
      done++;
      if (expd[out_ctx].size() == 0) begin
        failures += 2;
        $display("FAIL unexpected digest on context %0d", out_ctx);
      end else begin
        logic [159:0] e;
        longint te;
        e  = expd[out_ctx].pop_front();
        te = t_last[out_ctx].pop_front();
        if (out_digest !== e) begin
          failures++;
          $display("FAIL context %0d digest %h expected %h", out_ctx, out_digest, e);
        end
        if (cyc - te != 80) begin
          failures++;
          $display("FAIL context %0d latency %0d", out_ctx, cyc - te);
        end
      end
    end
  end

  function automatic logic all_busy();
    for (int k = 0; k < Q; k++) if (sent[k] >= blocks[k].size()) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    checks   = 0;
    failures = 0;
    finished = 0;
    // Build the work of every context.
    for (int k = 0; k < Q; k++) begin
      sent[k] = 0;
      for (int n = 0; n < NMSG; n++) begin
        rwords_t m, p;
        int len;
        len = (n == 0) ? 600 + k : $urandom % 1100;
        m = {};
        for (int j = 0; j < (len + 31) / 32; j++) m.push_back($urandom);
        p = pad(m, longint'(len));
        expd[k].push_back(hash_padded(p));
        foreach (p[i]) blocks[k].push_back(p[i]);
        msg_end[k].push_back(blocks[k].size());
      end
    end

    // Reset is released on a falling edge; the next rising edge is phase 0.
    wait (rst_n);
    // Phase 0 of the engine is the first cycle after reset.
    for (int slot = 0; slot < 400; slot++) begin
      int k;
      logic busy_all, go;
      k = int'(slot_ctx);
      busy_all = all_busy();
      // First 12 slots: every slot filled; afterwards random empty slots.
      go = (sent[k] < blocks[k].size()) && (slot < 12 || ($urandom % 4 != 0));
      if (!go) bubbles++;
      if (busy_all && go) full_slots++;
      if (go) begin
        logic lastblk;
        lastblk = (sent[k] + 16 == msg_end[k][0]);
        if (lastblk) begin
          void'(msg_end[k].pop_front());
          t_last[k].push_back(cyc);
        end
        taken++;
        for (int i = 0; i < R; i++) begin
          in_valid = (i < 16);
          in_data  = (i < 16) ? blocks[k][sent[k] + i] : $urandom;
          in_last  = lastblk;
          if (i < 16) begin
            checks++;
            if (!in_ready) begin
              failures++;
              $display("FAIL in_ready low at phase %0d", i);
            end
          end
          @(negedge clk);
        end
        sent[k] += 16;
      end else begin
        in_valid = 0;
        repeat (R) @(negedge clk);
      end
      in_valid = 0;
      if (done == Q * NMSG) break;
    end
    repeat (100) @(negedge clk);
    checks++;
    if (done != Q * NMSG || bubbles == 0 || full_slots == 0) begin
      failures++;
      $display("FAIL digests %0d of %0d, empty slots %0d, full slots %0d",
               done, Q * NMSG, bubbles, full_slots);
    end
    $display("Q=%0d: blocks %0d, digests %0d, empty slots %0d, slots with all contexts busy %0d",
             Q, taken, done, bubbles, full_slots);
    finished = 1;
  end
endmodule
