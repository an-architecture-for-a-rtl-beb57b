// tb_sha1_f: checks f(B,C,D) for every round group against the reference formulas.
module tb_sha1_f;
  import sha1_ref_pkg::*;
  logic [31:0] b, c, d, f;
  logic [1:0]  grp;
  int checks = 0, failures = 0;

  sha1_f dut (.b(b), .c(c), .d(d), .grp(grp), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int t;
      grp = 2'(i % 4);
      t   = 20 * (i % 4) + (i % 20);
      b = $urandom; c = $urandom; d = $urandom;
      #1;
      checks++;
      if (f !== f_ref(t, b, c, d)) begin
        failures++;
        $display("FAIL grp %0d b %h c %h d %h f %h", grp, b, c, d, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
