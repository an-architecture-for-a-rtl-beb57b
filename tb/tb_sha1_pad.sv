// tb_sha1_pad: streams messages of many bit lengths through the padder, with random
// gaps on the input and random back-pressure on the output, and compares every
// padded word and the last-word marker with the reference padding.  The first
// message is the 40-bit example "abcde", whose padded block is also checked
// against its known hex form.
module tb_sha1_pad;
  import sha1_ref_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0, out_last;
  logic [31:0] in_data = '0, out_data;
  logic [5:0]  in_nbits = '0;
  int checks = 0, failures = 0;

  sha1_pad dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                .in_data(in_data), .in_last(in_last), .in_nbits(in_nbits),
                .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data),
                .out_last(out_last));

  always #5 clk = ~clk;

  rwords_t expq;          // expected padded words, all messages in order
  logic    explast [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: random ready, compare each accepted word.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected word %h", out_data);
      end else begin
        rword_t e;
        logic   el;
        e  = expq.pop_front();
        el = explast.pop_front();
        if (out_data !== e || out_last !== el) begin
          failures++;
          $display("FAIL word %h last %b, expected %h last %b", out_data, out_last, e, el);
        end
      end
    end
  end
  always @(negedge clk) out_ready <= ($urandom % 4) != 0;

  task automatic send(rwords_t msg, int nbits);
    rwords_t p;
    int nw;
    p = pad(msg, longint'(nbits));
    foreach (p[i]) begin
      expq.push_back(p[i]);
      explast.push_back(i == p.size() - 1);
    end
    nw = (nbits + 31) / 32;
    if (nw == 0) nw = 1;
    for (int i = 0; i < nw; i++) begin
      @(negedge clk);
      while ($urandom % 5 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_data  = (i < msg.size()) ? msg[i] : $urandom;
      in_last  = (i == nw - 1);
      in_nbits = in_last ? 6'(nbits - 32 * i) : 6'd32;
      // Unused bits of the last word carry garbage; the padder must clear them.
      if (in_last && in_nbits < 32) in_data |= (32'hFFFF_FFFF >> in_nbits) & $urandom;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  int lens [16] = '{0, 1, 31, 32, 33, 440, 447, 448, 449, 480, 511, 512, 513, 959, 960, 1024};

  initial begin
    rwords_t m;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Example message "abcde": 40 bits.
    m = {32'h61626364, 32'h65000000};
    begin
      rwords_t p;
      p = pad(m, 40);
      checks++;
      if (p[0] != 32'h61626364 || p[1] != 32'h65800000 || p[15] != 32'h28) begin
        failures++;
        $display("FAIL reference padding of the example");
      end
    end
    send(m, 40);

    // Lengths around the block and word boundaries, then random lengths.
    for (int i = 0; i < 16; i++) begin
      m = {};
      for (int j = 0; j < (lens[i] + 31) / 32; j++) m.push_back($urandom);
      send(m, lens[i]);
    end
    for (int n = 0; n < 40; n++) begin
      int len;
      len = $urandom % 1500;
      m = {};
      for (int j = 0; j < (len + 31) / 32; j++) m.push_back($urandom);
      send(m, len);
    end
    wait (expq.size() == 0);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
