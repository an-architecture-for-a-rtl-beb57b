// tb_sha1_wt: loads random blocks into the round-word unit and checks W_0..W_79,
// one word per clock, against the reference message schedule.  Also checks that
// the unit holds its words while the enable is low.
module tb_sha1_wt;
  import sha1_ref_pkg::*;
  logic        clk = 0, rst_n = 0, en = 0, rnd_cn = 0;
  logic [31:0] msg_word = '0, wt;
  int checks = 0, failures = 0;

  sha1_wt dut (.clk(clk), .rst_n(rst_n), .en(en), .rnd_cn(rnd_cn),
               .msg_word(msg_word), .wt(wt));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rword_t blk [16];
    rword_t w [80];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 16; i++) blk[i] = $urandom;
      schedule(blk, w);
      for (int t = 0; t < 80; t++) begin
        @(negedge clk);
        rnd_cn   = (t < 16);
        msg_word = (t < 16) ? blk[t] : $urandom;
        en       = 1'b1;
        #1;
        checks++;
        if (wt !== w[t]) begin
          failures++;
          $display("FAIL block %0d t %0d got %h expected %h", n, t, wt, w[t]);
        end
        // A pause in the middle of the expansion must not disturb the schedule.
        if (t == 40) begin
          @(negedge clk);
          en = 1'b0;
          rnd_cn = 1'b0;
          @(negedge clk);
          #1;
          checks++;
          if (wt !== w[41]) begin
            failures++;
            $display("FAIL hold: got %h expected %h", wt, w[41]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
