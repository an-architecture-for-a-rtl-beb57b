// bcla: modulo-2^WIDTH adder built as a block carry look-ahead adder (BCLA).
//
// The operands are cut into sub-blocks of BLK bits.  Inside each sub-block the
// carries come from a carry look-ahead network over the bit generate (a&b) and
// propagate (a^b) signals.  Each sub-block also forms a group generate and a group
// propagate, and a second look-ahead level computes the carry into every sub-block
// from those, so no carry ripples from one sub-block to the next.  The carry out of
// the top bit is dropped: the sum is reduced modulo 2^WIDTH, as SHA-1 requires.
//
// Interface: purely combinational, s = a + b mod 2^WIDTH.
//
// The 32-bit width and the 4-bit sub-block size are the document's choice (it
// compared 4, 8 and 16-bit sub-blocks and kept 4).  The internal arrangement of the
// two look-ahead levels is this design's own reading of "block carry look-ahead",
// which the document names without drawing.
module bcla #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned BLK   = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s
);

  localparam int unsigned NBLK = WIDTH / BLK;

  logic [WIDTH-1:0] g, p;          // bit generate / propagate
  logic [NBLK-1:0]  gg, gp;        // group generate / propagate
  logic [NBLK:0]    bc;            // carry into each sub-block
  logic [WIDTH-1:0] c;             // carry into each bit

  assign g = a & b;
  assign p = a ^ b;

  // First level: group generate and propagate of each sub-block.
  always_comb begin
    for (int k = 0; k < NBLK; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int i = 0; i < BLK; i++) begin
        gg[k] = g[k*BLK+i] | (p[k*BLK+i] & gg[k]);
        gp[k] = gp[k] & p[k*BLK+i];
      end
    end
  end

  // Second level: carry into sub-block k, expanded as a sum of products over the
  // lower sub-blocks (carry in of the whole adder is 0).
  always_comb begin
    bc[0] = 1'b0;
    for (int k = 1; k <= NBLK; k++) begin
      bc[k] = 1'b0;
      for (int j = 0; j < k; j++) begin
        logic term;
        term = gg[j];
        for (int m = j + 1; m < k; m++) term = term & gp[m];
        bc[k] = bc[k] | term;
      end
    end
  end

  // Carries inside each sub-block, expanded in look-ahead form from the block carry.
  always_comb begin
    for (int k = 0; k < NBLK; k++) begin
      for (int i = 0; i < BLK; i++) begin
        logic ci;
        ci = bc[k];
        for (int j = 0; j < i; j++) ci = ci & p[k*BLK+j];
        for (int j = 0; j < i; j++) begin
          logic term;
          term = g[k*BLK+j];
          for (int m = j + 1; m < i; m++) term = term & p[k*BLK+m];
          ci = ci | term;
        end
        c[k*BLK+i] = ci;
      end
    end
  end

  assign s = p ^ c;

endmodule
