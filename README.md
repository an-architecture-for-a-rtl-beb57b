# SHA-1 engines for digital-signature hardware

A digital signature (DSA) is computed over the 160-bit SHA-1 digest of a message,
both when signing and when verifying, so a fast and small SHA-1 unit speeds up the
whole signature path. This RTL implements SHA-1 (FIPS 180 style: 512-bit blocks, 80
rounds, 160-bit digest) in two ways that share the same building blocks:

* a **compact engine**: one round cell used 80 times per block, with the message
  schedule computed on the fly in a 16-word shift register and a padding unit in
  front — 160 bits of digest per 80 clock cycles;
* a **pipelined engine**: Q round cells in a cascade (Q = 4 by default), each doing
  80/Q rounds, with one round-word register per stage — one block per 80/Q cycles,
  80 cycles of latency.

The DSA arithmetic itself (modular exponentiation and inversion) is not part of
this RTL; only the hash is.

## The round cell

One SHA-1 round updates the five working words A..E:

    A' = S5(A) + f_t(B,C,D) + E + W_t + K_t      (mod 2^32)
    B' = A    C' = S30(B)    D' = C    E' = D

`rsha1` computes this in one combinational step. The five-operand sum is split
over four adders so that the operands that are ready early are added first:
`W_t + K_t`, then `+ E`, in parallel with `S5(A) + f`, and a last adder joins the
two halves. The rotations are wiring.

`sha1_f` gives f for the four groups of 20 rounds: choose `(B&C)|(~B&D)` for
rounds 0-19, parity `B^C^D` for 20-39 and 60-79, majority `(B&C)|(B&D)|(C&D)` for
40-59. The gates are shared: the AND of B and C serves choose and majority, and a
small multiplexer hands either ~B or B to one AND with D, so the same gate gives
`~B&D` for choose and `B&D` for majority. A 2-bit round-group code drives that
multiplexer and the output multiplexer.

`bcla` is the 32-bit adder used everywhere: a block carry look-ahead adder with
4-bit sub-blocks. Each sub-block computes its own carries by look-ahead and
produces a group generate and propagate; a second look-ahead level over those
gives the carry into every sub-block, so no carry ripples. The sub-block width is
the parameter `BLK` (8, 16 and 32 also work; 4 was the best trade-off between
area and delay in an FPGA comparison of CLA, CPA and BCLA variants).

## Round words on the fly

Rounds 0-15 use the sixteen 32-bit words of the block as they are; later rounds use

    W_t = S1(W_t-16 ^ W_t-14 ^ W_t-8 ^ W_t-3)

`sha1_wt` keeps the last sixteen words in a 16 x 32-bit shift register, oldest
(W_t-16) in entry 0 and newest (W_t-1) in entry 15. "Block_M" XORs entries 0, 2,
8 and 13 and rotates by one. Each clock the register shifts one entry towards 0 and
entry 15 takes the word of the current round: the message word during rounds 0-15,
the Block_M result afterwards. The same choice drives the output, so the message
words go straight to the round cell while they are being loaded, and every clock
delivers one W_t. No 80-word schedule is ever stored.

## Compact engine (`sha1_iter`)

A round counter t runs 0..79, one round per clock.

    cycle    0        1 ... 15          16 ... 78      79                 80
    round    0        1 ... 15          16 ... 78      79 + final add     0 of next block
    input    word 0   words 1..15       -              -                  word 0
    state    H        A..E register     ...            ...                H (new)

In round 0 the multiplexer in front of the round cell takes the chaining value H
(the standard initial value for the first block of a message); in the other
rounds it takes the registered state. In round 79 the final addition H + A..E (five
more BCLA adders) is done in the same cycle, and the result is the chaining value
for the next block, so a new block starts right on the next clock: 80 cycles per
block with no gap. For the last block of a message the sum also goes to the
`digest` output, with `digest_valid` high for one cycle on the clock after round 79.

Words are taken with `w_valid`/`w_ready`; `w_ready` is high exactly in rounds 0-15.
If no word is offered there, the engine stalls in that round (the state, the counter
and the word register hold). `w_last` marks word 15 of a message's last block; after
that block the engine starts the next message from the initial value by itself.

## Padding (`sha1_pad`)

The padder turns a message of any bit length into whole 512-bit blocks: it
forwards the message words, clears the unused bits of the final word and sets the
bit after the message, sends zero words up to word 13 of a block and ends with the
64-bit bit length in words 14 and 15. If fewer than 65 bits are left in the last
block, the zeros run into one more block. If the final word is full, the 1 bit gets
a word of its own. The message enters MSB first as 32-bit words; the final word
carries `in_last` and `in_nbits` (0..32 valid leading bits). Message words pass
through combinationally; during the padding words the input is held off. Example:
the 40-bit message "abcde" becomes `61626364 65800000 00000000 ... 00000000 00000028`.

## Pipelined engine (`sha1_pipe`, `sha1_wt_pipe`)

This is the part that needs the most care. With Q stages and R = 80/Q rounds per
stage, all stages step on a common phase counter 0..R-1. On phase R-1 every stage
passes its state to the next stage's register, and stage 0 starts a new block at
phase 0. Throughput is 160 bits per R cycles (per 20 cycles at Q = 4) and the
latency is 80 cycles.

**Why contexts.** Block n+1 of a message needs the chaining value that block n
produces at the end of its 80 rounds, so two blocks of one message can never be in
the pipeline together. The Q blocks in flight therefore belong to Q independent
messages ("contexts"), served in a fixed rotation: the slot that starts now belongs
to context `slot_ctx`, and the same context comes round again exactly when its
previous block leaves the last stage.

**Two stacks.** The input stack holds, per context, the chaining value its next
block starts from (or a flag meaning "start from the initial value"). The output
stack is a Q-entry register that travels with the blocks and holds the value each
block started from, which the final addition after the last stage needs. When a
block leaves, H + A..E is written back to its context's input-stack entry on the
same clock edge, just in time for that context's next slot; for the last block of a
message it is also output as the digest.

**Round words per stage.** Each stage has its own 16-word register and Block_M.
Stage 0 loads the message during its first 16 rounds. At the end of a period the
window of stage s, already shifted by one and with the word of its last round in
entry 15, is written into stage s+1 instead of back into stage s. For Q = 4:

    after round    entries 0..15 hold           register set
    15             W0  .. W15                   stage 0
    19             W4  .. W19                   stage 0, handed to stage 1
    20             W5  .. W20                   stage 1

so stage s+1 starts with W_t-16..W_t-1 in place. This needs at least 16 rounds per
stage, so Q may be 1, 2, 4 or 5 (an 80-stage pipeline is not supported).

**Handshake.** At phase 0 the engine takes a block if `in_valid` is high
(`in_last` tells whether it is the last block of its message); otherwise the slot
stays empty and travels down the pipeline as a bubble. A block's 16 words must come
on consecutive cycles (an assertion checks this). `out_valid` pulses with
`out_ctx` and `out_digest` on the clock after the block's 80th round.

## Top level (`sha1_top`)

`sha1_top` holds both engines side by side with separate ports: `it_*` is the
compact engine behind the padder (raw message in, digest out), `pp_*` the pipelined
engine (padded blocks in, digests with their context out). Parameters: `Q` (4) and
`BLK` (4). Digests are 160 bits with H0 in the top word. Reset `rst_n` is
synchronous and active low. Shared types and constants are in `sha1_pkg`.

## Choices made in this design

These are not fixed by the architecture and may be changed freely:

* handshakes, the stall of the compact engine, empty pipeline slots and the
  context rotation of the pipeline;
* the final addition in the same cycle as round 79 (it lengthens the critical path
  by one adder; a separate cycle would cost one cycle per block);
* round constants held as constants selected by round group, not loadable registers;
  the initial value is a constant too, not an input;
* the pipeline takes already padded blocks, because one padder handles one message
  stream while the pipeline interleaves Q of them; padding Q streams needs Q padders
  or a padded-block source;
* the wiring inside the round-function and adder blocks is one reasonable
  arrangement of the named gates and look-ahead levels;
* the initial hash value is the standard `67452301 EFCDAB89 98BADCFE 10325476
  C3D2E1F0`.

## Sizes

The compact engine holds 160 bits of state, 160 bits of chaining value, 512 bits of
round words and a 7-bit counter; the padder a 64-bit length counter. The pipeline
at Q = 4 holds four 160-bit stage registers, 2 x 4 x 160 bits of stacks and
4 x 512 bits of round words.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/` that compares it with
a plain software model of SHA-1 (`tb/sha1_ref_pkg.sv`) and prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_bcla` | sums for carry-chain corner cases and random operands, sub-blocks 4, 8, 16, 32 |
| `tb_sha1_f` | f for all groups on random words |
| `tb_rsha1` | one round for all 80 round numbers |
| `tb_sha1_wt` | W_0..W_79 per clock, and holding while disabled |
| `tb_sha1_pad` | padded words of messages of 0..1500 bits with gaps and back-pressure |
| `tb_sha1_iter` | digests of "abc", "abcde", "", the 448-bit standard vector and random messages; 80 cycles per block; stalls |
| `tb_sha1_wt_pipe` | the round word of every stage in every cycle with a new block every period |
| `tb_sha1_pipe` | interleaved multi-block messages at Q = 1, 2, 4, 5: digests, context, 80-cycle latency, empty slots |
| `tb_sha1_top` | both engines end to end at default sizes; counts stalls, added padding blocks, full final words, back-pressure, back-to-back blocks, multi-block chaining, empty slots and full pipelines, and fails if one never happened |

Run one with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/sha1_pkg.sv tb/sha1_ref_pkg.sv tb/tb_sha1_top.sv --top-module tb_sha1_top
    ./obj_dir/Vtb_sha1_top

Every testbench runs in well under a second of simulated time.
