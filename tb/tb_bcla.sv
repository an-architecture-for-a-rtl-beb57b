// tb_bcla: checks the block carry look-ahead adder against the + operator on
// carry-chain corner cases and random operands, for the default 4-bit sub-blocks
// and for the 8-bit and 16-bit sub-block variants and the one-level 32-bit CLA.
module tb_bcla;
  logic [31:0] a, b, s, s8, s16, s32;
  int checks = 0, failures = 0;

  bcla dut (.a(a), .b(b), .s(s));
  bcla #(.BLK(8))  dut8  (.a(a), .b(b), .s(s8));
  bcla #(.BLK(16)) dut16 (.a(a), .b(b), .s(s16));
  bcla #(.BLK(32)) dut32 (.a(a), .b(b), .s(s32));

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    a = x; b = y; #1;
    exp = x + y;
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, s, exp);
    end
    checks++;
    if (s8 !== exp || s16 !== exp || s32 !== exp) begin
      failures++;
      $display("FAIL variants %h + %h = %h %h %h", x, y, s8, s16, s32);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0, 32'h0);
    check(32'hFFFF_FFFF, 32'h1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'h7FFF_FFFF, 32'h1);
    for (int k = 0; k < 32; k++) begin
      check(32'hFFFF_FFFF >> k, 32'h1);
      check(32'h1 << k, 32'h1 << k);
    end
    for (int i = 0; i < 5000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
