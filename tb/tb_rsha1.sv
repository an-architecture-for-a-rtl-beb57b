// tb_rsha1: checks one RSHA-1 round for all 80 round numbers on random states.
module tb_rsha1;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;
  state_t s_in, s_out;
  word_t  w, k;
  group_t grp;
  int checks = 0, failures = 0;

  rsha1 dut (.s_in(s_in), .w(w), .k(k), .grp(grp), .s_out(s_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int t;
      logic [159:0] exp;
      t    = i % 80;
      s_in = {$urandom, $urandom, $urandom, $urandom, $urandom};
      w    = $urandom;
      k    = k_ref(t);
      grp  = 2'(t / 20);
      #1;
      exp = round_ref(s_in, t, w);
      checks++;
      if (s_out !== exp) begin
        failures++;
        $display("FAIL t %0d got %h expected %h", t, s_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
