// tb_sha1_top: end-to-end test of both engines at their default sizes.
//
// Compact engine: raw messages of chosen and random bit lengths enter the padder
// with random gaps; every digest is compared with the reference model, and the
// known digests of "abc" and "abcde" are checked as well.  Pipelined engine: four
// interleaved contexts of multi-block messages, padded by the testbench, with
// random empty slots.  The test counts each mechanism of the design and fails if
// one never happened: a round stall for want of a message word, a padding block
// added because the length field did not fit, a full final word, padder
// back-pressure, back-to-back blocks, multi-block chaining in both engines, empty
// pipeline slots, and all Q pipeline stages busy at once.
module tb_sha1_top;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;
  localparam int Q = 4;
  localparam int R = 80 / Q;

  logic       clk = 0, rst_n = 0;
  logic       it_valid = 0, it_ready, it_last = 0, it_digest_valid, it_busy;
  word_t      it_data = '0;
  logic [5:0] it_nbits = '0;
  state_t     it_digest;
  logic       pp_valid = 0, pp_ready, pp_last = 0, pp_digest_valid;
  word_t      pp_data = '0;
  logic [1:0] pp_slot_ctx, pp_digest_ctx;
  state_t     pp_digest;

  int checks = 0, failures = 0;
  int n_stall = 0, n_spill = 0, n_fullword = 0, n_backpressure = 0, n_back2back = 0;
  int n_it_multi = 0, n_pp_multi = 0, n_empty_slot = 0, n_all_stages = 0;
  int it_done = 0, pp_done = 0;
  longint cyc = 0;

  sha1_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  // Observed at the ports only.  The engine stalls when it waits for a word inside
  // a block (busy) while the padder would pass one on (it_ready) but none is offered.
  // Back-to-back blocks show as busy dropping for the single cycle of round 0.
  logic busy_d1 = 0, busy_d2 = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    busy_d1 <= it_busy;
    busy_d2 <= busy_d1;
    if (rst_n) begin
      if (it_busy && it_ready && !it_valid) n_stall++;
      if (it_valid && !it_ready) n_backpressure++;
      if (busy_d2 && !busy_d1 && it_busy) n_back2back++;
    end
  end

  // ---------------- compact engine ----------------
  logic [159:0] it_exp [$];

  always @(posedge clk) begin
    if (rst_n && it_digest_valid) begin
      checks++;
      it_done++;
      if (it_exp.size() == 0) begin
        failures++;
        $display("FAIL unexpected digest from the compact engine");
      end else begin
        logic [159:0] e;
        e = it_exp.pop_front();
        if (it_digest !== e) begin
          failures++;
          $display("FAIL compact engine digest %h expected %h", it_digest, e);
        end
      end
    end
  end

  task automatic it_send(rwords_t msg, int nbits, logic gaps);
    int nw;
    it_exp.push_back(hash(msg, longint'(nbits)));
    if (nbits % 512 >= 448) n_spill++;
    if (nbits % 32 == 0) n_fullword++;
    if (nbits >= 448) n_it_multi++;
    nw = (nbits + 31) / 32;
    if (nw == 0) nw = 1;
    for (int i = 0; i < nw; i++) begin
      @(negedge clk);
      while (gaps && ($urandom % 8 == 0)) begin
        it_valid = 0;
        @(negedge clk);
      end
      it_valid = 1;
      it_data  = (i < msg.size()) ? msg[i] : '0;
      it_last  = (i == nw - 1);
      it_nbits = it_last ? 6'(nbits - 32 * i) : 6'd32;
      @(posedge clk);
      while (!it_ready) @(posedge clk);
    end
    @(negedge clk);
    it_valid = 0;
    it_last  = 0;
  endtask

  int it_lens [8] = '{24, 40, 0, 32, 448, 480, 1024, 2000};

  task automatic it_run();
    rwords_t m;
    m = {32'h61626300};
    it_send(m, 24, 0);
    m = {32'h61626364, 32'h65000000};
    it_send(m, 40, 0);
    for (int i = 2; i < 8; i++) begin
      m = {};
      for (int j = 0; j < (it_lens[i] + 31) / 32; j++) m.push_back($urandom);
      it_send(m, it_lens[i], i[0]);
    end
    for (int n = 0; n < 10; n++) begin
      int len;
      len = $urandom % 1600;
      m = {};
      for (int j = 0; j < (len + 31) / 32; j++) m.push_back($urandom);
      it_send(m, len, 1);
    end
  endtask

  // Known vectors, checked separately on the first two digests.
  initial begin
    @(posedge clk iff (rst_n && it_digest_valid));
    checks++;
    if (it_digest !== 160'hA9993E36_4706816A_BA3E2571_7850C26C_9CD0D89D) begin
      failures++;
      $display("FAIL digest of \"abc\": %h", it_digest);
    end
    @(posedge clk iff it_digest_valid);
    checks++;
    if (it_digest !== 160'h03DE6C57_0BFE24BF_C328CCD7_CA46B76E_ADAF4334) begin
      failures++;
      $display("FAIL digest of \"abcde\": %h", it_digest);
    end
  end

  // ---------------- pipelined engine ----------------
  localparam int NMSG = 4;
  rwords_t      pblocks [Q];
  int           pmsg_end [Q][$];
  logic [159:0] pp_exp [Q][$];
  int           psent [Q];

  always @(posedge clk) begin
    if (rst_n && pp_digest_valid) begin
      checks++;
      pp_done++;
      if (pp_exp[pp_digest_ctx].size() == 0) begin
        failures++;
        $display("FAIL unexpected digest on context %0d", pp_digest_ctx);
      end else begin
        logic [159:0] e;
        e = pp_exp[pp_digest_ctx].pop_front();
        if (pp_digest !== e) begin
          failures++;
          $display("FAIL pipeline context %0d digest %h expected %h", pp_digest_ctx, pp_digest, e);
        end
      end
    end
  end

  task automatic pp_run();
    int run;
    for (int k = 0; k < Q; k++) begin
      psent[k] = 0;
      for (int n = 0; n < NMSG; n++) begin
        rwords_t m, p;
        int len;
        len = (n == 0) ? 700 : $urandom % 1300;
        m = {};
        for (int j = 0; j < (len + 31) / 32; j++) m.push_back($urandom);
        p = pad(m, longint'(len));
        if (p.size() > 16) n_pp_multi++;
        pp_exp[k].push_back(hash_padded(p));
        foreach (p[i]) pblocks[k].push_back(p[i]);
        pmsg_end[k].push_back(pblocks[k].size());
      end
    end
    run = 0;
    for (int slot = 0; slot < 400 && pp_done < Q * NMSG; slot++) begin
      int k;
      logic go;
      k  = int'(pp_slot_ctx);
      go = (psent[k] < pblocks[k].size()) && (slot < 12 || ($urandom % 4 != 0));
      if (!go) begin
        n_empty_slot++;
        run = 0;
      end else begin
        run++;
        if (run >= Q) n_all_stages++;   // Q blocks in flight, one per stage
      end
      if (go) begin
        logic lastblk;
        lastblk = (psent[k] + 16 == pmsg_end[k][0]);
        if (lastblk) void'(pmsg_end[k].pop_front());
        for (int i = 0; i < R; i++) begin
          pp_valid = (i < 16);
          pp_data  = (i < 16) ? pblocks[k][psent[k] + i] : '0;
          pp_last  = lastblk;
          if (i < 16) begin
            checks++;
            if (!pp_ready) begin
              failures++;
              $display("FAIL pipeline not ready at phase %0d", i);
            end
          end
          @(negedge clk);
        end
        psent[k] += 16;
      end else begin
        pp_valid = 0;
        repeat (R) @(negedge clk);
      end
      pp_valid = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    fork
      it_run();
      pp_run();
    join
    wait (it_exp.size() == 0);
    repeat (200) @(negedge clk);
    checks += 2;
    if (it_done != 18) begin
      failures++;
      $display("FAIL compact engine gave %0d digests of 18", it_done);
    end
    if (pp_done != Q * NMSG) begin
      failures++;
      $display("FAIL pipeline gave %0d digests of %0d", pp_done, Q * NMSG);
    end
    $display("stalls %0d, padding blocks added %0d, full final words %0d, back-pressure %0d",
             n_stall, n_spill, n_fullword, n_backpressure);
    $display("back-to-back blocks %0d, multi-block messages %0d / %0d",
             n_back2back, n_it_multi, n_pp_multi);
    $display("empty pipeline slots %0d, slots with all stages busy %0d",
             n_empty_slot, n_all_stages);
    begin
      int cnt [9];
      cnt = '{n_stall, n_spill, n_fullword, n_backpressure, n_back2back, n_it_multi,
              n_pp_multi, n_empty_slot, n_all_stages};
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
