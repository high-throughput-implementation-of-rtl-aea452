// sha512_core: the "80 operations" unit: working-variable register A..H
// around the two-round operation block.
//
// Each clock with `en` high the register takes the operation block's result,
// so the 80 SHA-512 rounds of a block take 40 clocks and the register is
// written 40 times per block instead of 80. On the last of the 40 clocks the
// caller raises `load` together with `en`, and the register takes `load_val`
// instead: the chaining value for the next block of the same message, or the
// initial hash value when a message has ended. The result of that last cycle
// is still visible on `nxt` during it, which is where the digest logic picks
// it up, so consecutive blocks follow each other with no idle clock. The
// price is that in that last clock the path from this register through the
// operation block continues through the digest adders and the load
// multiplexer, one 64-bit addition longer than the operation block alone;
// the alternative, a separate clock for the addition, would cost 41 clocks
// per block instead of 40.
//
// Reset (active low, synchronous) puts the initial hash value in the register.
// w0/k0 and w1/k1 are the schedule words and constants of the two rounds of
// the current cycle and must be valid in the same clock (combinational RAM and
// constant reads).
module sha512_core
  import sha512_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   load,
  input  state_t load_val,
  input  word_t  w0,
  input  word_t  k0,
  input  word_t  w1,
  input  word_t  k1,
  output state_t st,
  output state_t nxt
);

  sha512_op2 u_op (
    .s_in (st),
    .w0   (w0),
    .k0   (k0),
    .w1   (w1),
    .k1   (k1),
    .s_out(nxt)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)
      st <= IV;
    else if (load)
      st <= load_val;
    else if (en)
      st <= nxt;
  end

endmodule
