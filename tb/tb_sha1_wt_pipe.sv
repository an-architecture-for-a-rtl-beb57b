// tb_sha1_wt_pipe: feeds a new random block into the pipelined round-word unit in
// every stage period and checks, in every cycle, the round word of every stage
// against the reference schedule of the block that stage is working on.
module tb_sha1_wt_pipe;
  import sha1_ref_pkg::*;
  localparam int Q = 4;           // the unit's default depth
  localparam int R = 80 / Q;
  localparam int NBLK = 12;
  logic        clk = 0, rst_n = 0;
  logic [6:0]  phase = '0;
  logic [31:0] msg_word = '0;
  logic [31:0] wt [Q];
  int checks = 0, failures = 0;

  rword_t sched [NBLK][80];

  sha1_wt_pipe dut (.clk(clk), .rst_n(rst_n), .phase(phase),
                             .msg_word(msg_word), .wt(wt));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rword_t blk [16];
    rword_t w [80];
    for (int n = 0; n < NBLK; n++) begin
      for (int i = 0; i < 16; i++) blk[i] = $urandom;
      schedule(blk, w);
      sched[n] = w;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NBLK + Q - 1; n++) begin
      for (int c = 0; c < R; c++) begin
        phase    = 7'(c);
        msg_word = (c < 16 && n < NBLK) ? sched[n][c] : $urandom;
        #1;
        for (int s = 0; s < Q; s++) begin
          if (n - s >= 0 && n - s < NBLK) begin
            checks++;
            if (wt[s] !== sched[n-s][s*R + c]) begin
              failures++;
              $display("FAIL stage %0d block %0d round %0d: %h expected %h",
                       s, n - s, s*R + c, wt[s], sched[n-s][s*R + c]);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
