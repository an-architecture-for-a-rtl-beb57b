// tb_sha1_pipe: tests the pipelined engine at its default depth Q = 4 and at the
// other depths that divide the 80 rounds into stages of at least 16 rounds (Q = 1,
// 2 and 5), each in its own environment (sha1_pipe_env) running Q interleaved
// message streams.  Each environment checks every digest against the reference
// model, the 80-cycle latency from the last block's entry to its digest, and that
// a block offered in every slot is always taken.
module tb_sha1_pipe;
  logic clk = 0, rst_n = 0;
  int   ck [4], fl [4];
  logic fin [4];
  int   checks, failures;

  sha1_pipe_env #(.Q(4)) env4 (.clk(clk), .rst_n(rst_n), .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  sha1_pipe_env #(.Q(1)) env1 (.clk(clk), .rst_n(rst_n), .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  sha1_pipe_env #(.Q(2)) env2 (.clk(clk), .rst_n(rst_n), .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  sha1_pipe_env #(.Q(5)) env5 (.clk(clk), .rst_n(rst_n), .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));

  always #5 clk = ~clk;

  function automatic void total();
    checks   = ck[0] + ck[1] + ck[2] + ck[3];
    failures = fl[0] + fl[1] + fl[2] + fl[3];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
