# SHA-512 core with a two-round operation block

This is a SHA-512 hash core (FIPS 180-2) that computes two compression rounds in each clock. The 80 rounds of a
1024-bit block therefore take 40 clocks. Unrolling two rounds naively would put two full
round delays in series. This design avoids that by reordering the additions: the second round's work
starts from the inputs that are known early, and only a short tail has to wait for the first
round's A and E. The rest of the core is built so that nothing else costs clocks. The message schedule of the
next block is produced while the current block is hashed, and the hash-value update happens in the
last round clock. For messages longer than one block, the core sustains one block every 40 clocks.

The arrangement follows a published architecture for a partially unrolled SHA-512. It has a padding unit, a
constants' array with the schedule generator, a message-schedule RAM, the round unit, digest
extraction and a control unit. The operation block implements that architecture's equations. The
sequencing, interfaces and RAM organisation are this implementation's own (see
"What is published and what is chosen here").

## The two-round operation block (`sha512_op2`)

One plain SHA-512 round on the working variables A..H is:

    T1    = H + Sigma1(E) + Ch(E,F,G) + K_t + W_t
    A'    = T1 + Sigma0(A) + Maj(A,B,C)
    E'    = D + T1
    B',C',D' = A,B,C       F',G',H' = E,F,G

Six of the eight outputs are plain moves. Only A' and E' need arithmetic. Across two rounds
(t, then t+1), several of the second round's operands are the first round's inputs, merely moved:

* the second round's H is the first round's G;
* the second round's D is the first round's C;
* its F and G are the first round's E and F;
* its B and C are A1 and the first round's A.

So a part of the second round's sum can be formed immediately, in parallel with the first round:

    Im1 = (W_{t+1} + K_{t+1}) + G        -- everything of round t+1's T1 except Sigma1/Ch
    Im2 = Im1 + C                        -- the same plus round t+1's D

In SHA-512, E1 = T1 + D is known well before A1 = T1 + Sigma0(A) + Maj(A,B,C). A1 needs one more
carry-propagate addition than E1. The Sigma1/Ch part of the second round depends only on E1, E and F, so it is
added as soon as E1 exists:

    Im3 = Im1 + Sigma1(E1) + Ch(E1, E, F)
    Im4 = Im2 + Sigma1(E1) + Ch(E1, E, F)      = E2, finished

When A1 finally arrives, only one term and one addition remain:

    A2  = Im3 + Sigma0(A1) + Maj(A1, A, B)

The outputs are `{A2, A1, A, B, Im4, E1, E, F}`. The critical path is therefore one round plus
Sigma0/Maj and one adder, not two rounds. The analysis behind the architecture puts the clock at
about 62 % of the single-round clock. At half the clocks per block, that is about 1.24 times the
throughput of a one-round-per-clock core. The working-variable register is also written half as
often, 40 times per block instead of 80, which saves power. Unrolling further is not attractive. With four
rounds, A and B reach C and D of the output directly, and the intermediate logic would add to the
path instead of hiding behind it.

The block is purely combinational. The RTL groups the operands of each sum the way the published block diagram
does: W+K first, then +H; Sigma1+Ch as a separate pair. A synthesis tool is free to turn the
multi-operand sums into carry-save trees. Its result is bit-identical to two standard rounds,
and the testbench checks exactly that.

## Dataflow and timing

    message words ─► sha512_pad ─► sha512_wgen ─► sha512_msram (2 banks) ─► sha512_core ─► sha512_digest ─► digest
                         1024-bit block   W pairs        40 × 128 bit           (sha512_op2)
                                                                             ▲ sha512_kconst (K pairs, H(0))
                         sha512_ctrl sequences the fill and the rounds

* **Padding (`sha512_pad`).** Message words enter on a valid/ready port, 64 bits per clock, first byte in bits 63:56.
  The word with `in_last` carries 0..8 bytes (`in_bytes`). The unit appends 0x80, zeros and the 128-bit
  bit length. If the length no longer fits, it emits an extra padding-only block. A full block is offered
  with `blk_final` on the message's last block. After the last word the padding words are written one per clock,
  so a block is ready at most 16 clocks later.
* **Schedule (`sha512_wgen`, `sha512_msram`).** A block is loaded into a 16-word window. For 40 clocks
  the window presents W[2c], W[2c+1] and shifts by two, and the pair is written to entry c of one RAM
  bank. The two new words per clock depend only on words already in the window, so both can be
  computed in the same clock.
* **Rounds (`sha512_core`, `sha512_kconst`).** When a bank is complete, the core runs 40 clocks. In
  clock c it reads entry c of that bank and K[2c], K[2c+1], and it writes A..H once.
* **Digest (`sha512_digest`).** In the 40th clock the operation block's result is added word by word
  to the hash value H. If the block was not the message's last, the sum becomes the new H and, in the
  same clock edge, the start state of the next block. If it was the last, the sum is the digest: it
  is registered with a one-clock `digest_valid`, and H and the working registers go back to H(0).
  A following message can therefore start in the very next clock.
* **Control (`sha512_ctrl`).** Two sequences, coupled through the bank-full flags:
  - The fill takes a block whenever a bank is free. It can take a new block in its own last clock.
  - The rounds start on a full bank. A bank that completes in the same clock as the other bank's
    40th round clock is taken at once, so no idle clock is lost.
  - Assertions check that a full bank is never overwritten and that only full banks are read.

Timing for `sha512_top` (clocks measured at the rising edge):

| event | clocks |
|---|---|
| block handed from padding unit to start of its rounds | 41 |
| rounds per block | 40 |
| last round clock to `digest_valid` | 1 |
| steady-state block interval, message of many blocks | 40 |
| 12-block message, first input word to digest (measured) | 540 |

At 40 clocks per 1024 bits, a 58 MHz clock gives 1485 Mbit/s. That clock frequency is the figure
reported for the published design on a Virtex-E FPGA; it has not been re-measured for this RTL.

## Top-level interface (`sha512_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid`, `in_ready` | in/out | 1 | message word handshake |
| `in_data` | in | 64 | message bytes, first byte in bits 63:56 |
| `in_last` | in | 1 | last word of the message |
| `in_bytes` | in | 4 | valid bytes in the last word, 0..8 (0 for an empty message) |
| `digest` | out | 512 | H0..H7, H0 in bits 511:448; held until the next digest |
| `digest_valid` | out | 1 | one-clock pulse per message |
| `busy` | out | 1 | a block is being padded, filled or hashed |

There is no back-pressure on the digest. A consumer must take it in the pulse clock or read the held value
before the next message ends. Messages are byte-aligned. Every word except the last must carry 8 bytes.

## Modules

| file | role |
|---|---|
| `rtl/sha512_pkg.sv` | word and state types, K table, H(0), Sigma/sigma/Ch/Maj |
| `rtl/sha512_op2.sv` | two-round operation block (combinational) |
| `rtl/sha512_core.sv` | A..H register around the operation block |
| `rtl/sha512_kconst.sv` | constants' array: K pair per cycle, H(0) |
| `rtl/sha512_wgen.sv` | schedule generator, two words per clock |
| `rtl/sha512_msram.sv` | schedule RAM, `NBANKS`×`DEPTH` entries of `WIDTH` bits (2×40×128) |
| `rtl/sha512_pad.sv` | padding and block assembly |
| `rtl/sha512_digest.sv` | hash-value accumulation and digest output |
| `rtl/sha512_ctrl.sv` | fill/round sequencing |
| `rtl/sha512_top.sv` | the core |

The K table and H(0) are the standard's constants. K_t is the first 64 fraction bits of the cube root of the t-th
prime, and H(0) the first 64 fraction bits of the square roots of the first eight primes. The
testbench reference model derives them from the primes instead of copying them.

## Verification

Each module has a self-checking testbench in `tb/`, and each ends with a `TB_RESULT checks=N failures=M` line.
The reference model (`tb/sha512_ref_pkg.sv`) is a plain one-round-per-step SHA-512 written
independently of the RTL. It computes its own constants, schedule and padding.

* `tb_sha512_op2`: 502 random and corner states; output equals two reference rounds.
* `tb_sha512_kconst`: all 80 constants and H(0) against the prime-derived values.
* `tb_sha512_wgen`: W[0..79] of random blocks, including a load in the last step clock.
* `tb_sha512_msram`: both banks, bank isolation, same-clock read.
* `tb_sha512_core`: state after every clock against the reference, hold, load, reset.
* `tb_sha512_digest`: accumulation over multi-block messages, the pulse, and the return to H(0).
* `tb_sha512_pad`: 54 messages including lengths 0, 111, 112, 127, 128 and 240, under random gaps and back-pressure.
* `tb_sha512_ctrl`: the scoreboard of fill and read order, final flags, and the 40-clock spacing of back-to-back blocks.
* `tb_sha512_top`: end to end. The FIPS 180-2 "abc" and 896-bit two-block examples are checked against their printed
  digests, all 25 messages it sends against the reference, the 40-clock block rate, and a count of each
  mechanism (chaining, extra padding block, empty message, input stall, back-to-back blocks,
  back-to-back messages).

The core has no size parameters, so the end-to-end test runs the full design. To run a test with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/sha512_pkg.sv tb/sha512_ref_pkg.sv tb/tb_sha512_top.sv --top-module tb_sha512_top
    ./obj_dir/Vtb_sha512_top

Replace `tb_sha512_top` with any other testbench name. Every test finishes in well under a second of simulation.

## What is published and what is chosen here

Follows the published architecture:

* the block structure: padding unit, constants' array with schedule generator, schedule RAM, 80-operation unit,
  digest extraction, control unit;
* the two-round condensed cycle and its intermediate sums Im1..Im4;
* 40 register writes per block;
* a 1024-bit padded block and a 512-bit digest;
* the 40-clock block rate implied by the reported throughput and clock frequency.

The round functions, constants, schedule recurrence and padding are the standard's. Rotations are to
the right, as the standard defines them and as its test vectors require.

Chosen here, because the architecture does not specify them:

* the 64-bit word-serial message input with valid/ready and byte count;
* the digest pulse without back-pressure;
* synchronous active-low reset;
* a schedule RAM of two banks of 40 entries × two words with combinational read, used so that the schedule of the
  next block is written while the current one is hashed;
* the control sequencing;
* the feed-forward addition folded into the last round clock. This keeps the 40-clock rate, but it puts one
  64-bit adder and a multiplexer after the operation block on that clock's path. A timing-critical
  implementation would merge the hash value into the operation block's last-stage sums, or accept 41 clocks
  per block.

The published diagram of the core labels the path from the schedule RAM to the round unit as eight 64-bit words.
Here that path carries the two words that one clock consumes.

Not included:

* the HMAC wrapper that the core is meant to sit in;
* the on-board self-test unit used to exercise the published core, whose stimulus and interface are unknown.

The FPGA area and clock frequency of this RTL have not been measured.

## Changing the design

* The schedule RAM is the only module with size parameters. With `NBANKS` = 1 the fill and the rounds can no longer
  overlap, and `sha512_ctrl` assumes two banks.
* The unroll factor is structural: `UNROLL` and `CYCLES` in the package document it, but
  `sha512_op2` is written for exactly two rounds.
* To trade speed for area, `sha512_op2` can be replaced by a single round with `CYCLES` = 80. The schedule generator must then present one word per clock.
