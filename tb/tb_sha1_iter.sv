// tb_sha1_iter: hashes padded messages on the iterative engine and compares the
// digests with the standard test vectors and with the reference model.  Messages
// sent without gaps must give their digest exactly 80 cycles per block after the
// first word is taken (one round per clock); messages sent with random gaps in the
// first 16 words exercise the stall and must still hash correctly.
module tb_sha1_iter;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;
  logic   clk = 0, rst_n = 0;
  logic   w_valid = 0, w_ready, w_last = 0, digest_valid, busy;
  word_t  w_data = '0;
  state_t digest;
  int checks = 0, failures = 0, stalls = 0;
  longint cyc = 0;

  sha1_iter dut (.clk(clk), .rst_n(rst_n), .w_valid(w_valid), .w_ready(w_ready),
                 .w_data(w_data), .w_last(w_last), .digest_valid(digest_valid),
                 .digest(digest), .busy(busy));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && w_ready && !w_valid && busy) stalls++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one padded message and wait for its digest; check value and timing.
  task automatic run(rwords_t msg, int nbits, logic gaps, logic [159:0] known, logic use_known);
    rwords_t p;
    logic [159:0] exp;
    longint t0;
    p   = pad(msg, longint'(nbits));
    exp = hash_padded(p);
    fork
      begin
        for (int i = 0; i < p.size(); i++) begin
          @(negedge clk);
          while (gaps && ($urandom % 3 == 0)) begin
            w_valid = 0;
            @(negedge clk);
          end
          w_valid = 1;
          w_data  = p[i];
          w_last  = (i == p.size() - 1);
          @(posedge clk);
          while (!w_ready) @(posedge clk);
          if (i == 0) t0 = cyc;
        end
        @(negedge clk);
        w_valid = 0;
        w_last  = 0;
      end
      begin
        @(posedge clk iff digest_valid);
      end
    join
    checks++;
    if (digest !== exp) begin
      failures++;
      $display("FAIL %0d-bit message: digest %h expected %h", nbits, digest, exp);
    end
    if (use_known) begin
      checks++;
      if (digest !== known) begin
        failures++;
        $display("FAIL known vector: digest %h expected %h", digest, known);
      end
    end
    if (!gaps) begin
      checks++;
      if (cyc - t0 != 64'(80 * (p.size() / 16))) begin
        failures++;
        $display("FAIL latency %0d cycles for %0d blocks", cyc - t0, p.size() / 16);
      end
    end
  endtask

  initial begin
    rwords_t m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    m = {32'h61626300};
    run(m, 24, 0, 160'hA9993E36_4706816A_BA3E2571_7850C26C_9CD0D89D, 1);
    m = {32'h61626364, 32'h65000000};
    run(m, 40, 0, 160'h03DE6C57_0BFE24BF_C328CCD7_CA46B76E_ADAF4334, 1);
    m = {};
    run(m, 0, 1, 160'hDA39A3EE_5E6B4B0D_3255BFEF_95601890_AFD80709, 1);
    m = {32'h61626364, 32'h62636465, 32'h63646566, 32'h64656667, 32'h65666768,
         32'h66676869, 32'h6768696A, 32'h68696A6B, 32'h696A6B6C, 32'h6A6B6C6D,
         32'h6B6C6D6E, 32'h6C6D6E6F, 32'h6D6E6F70, 32'h6E6F7071};
    run(m, 448, 0, 160'h84983E44_1C3BD26E_BAAE4AA1_F95129E5_E54670F1, 1);
    for (int n = 0; n < 12; n++) begin
      int len;
      len = $urandom % 1200;
      m = {};
      for (int j = 0; j < (len + 31) / 32; j++) m.push_back($urandom);
      run(m, len, n[0], '0, 0);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL the stall never happened");
    end
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
