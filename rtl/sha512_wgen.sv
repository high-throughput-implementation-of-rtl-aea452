// sha512_wgen: SHA-512 message schedule generator, two words per clock.
//
// Holds a sliding window of sixteen schedule words W[t..t+15]. `load`
// fills it with the sixteen 64-bit words of a 1024-bit message block (word 0
// in bits 1023:960, big-endian as the standard parses it), which are W[0..15].
// The two oldest words of the window are always presented on w0/w1
// (W[t], W[t+1]). Each `step` shifts the window by two and appends
//
//   W[j] = sigma1(W[j-2]) + W[j-7] + sigma0(W[j-15]) + W[j-16],  j = t+16, t+17
//
// Both new words depend only on words already in the window, so the two
// expansions are independent and fit in one clock. Forty steps after a load
// w0/w1 have presented W[0..79] in pairs, one pair per condensed cycle of
// the operation block; the caller writes each pair into the schedule RAM.
// `load` takes priority over `step`. The window needs no reset: it is only
// read after a load.
module sha512_wgen
  import sha512_pkg::*;
(
  input  logic                clk,
  input  logic                load,
  input  logic [BLOCK_W-1:0]  block,
  input  logic                step,
  output word_t               w0,
  output word_t               w1
);

  word_t win [BLOCK_WORDS];
  word_t n0, n1;

  always_comb begin
    n0 = small_sigma1(win[14]) + win[9]  + small_sigma0(win[1]) + win[0];
    n1 = small_sigma1(win[15]) + win[10] + small_sigma0(win[2]) + win[1];
    w0 = win[0];
    w1 = win[1];
  end

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < BLOCK_WORDS; i++)
        win[i] <= block[BLOCK_W-1-64*i -: 64];
    end else if (step) begin
      for (int i = 0; i < BLOCK_WORDS-2; i++)
        win[i] <= win[i+2];
      win[BLOCK_WORDS-2] <= n0;
      win[BLOCK_WORDS-1] <= n1;
    end
  end

endmodule
