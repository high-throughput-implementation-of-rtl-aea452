// sha512_op2: partially unrolled SHA-512 operation block (two rounds in one).
//
// Purely combinational. It takes the working variables A..H of round t and
// the schedule words and constants of the two following rounds, and returns
// A..H two rounds later. Results equal two plain SHA-512 rounds; only the
// order of the additions differs, arranged so that the second round's work
// starts before the first round's A and E are known:
//
//   first round   T1   = (W0 + K0) + H + Sigma1(E) + Ch(E,F,G)
//                 A1   = T1 + Sigma0(A) + Maj(A,B,C)      E1 = T1 + D
//   in parallel   Im1  = (W1 + K1) + G           (G is the next round's H)
//                 Im2  = Im1 + C                 (C is the next round's D)
//   once E1 ready Im3  = Im1 + Sigma1(E1) + Ch(E1,E,F)
//                 Im4  = Im2 + Sigma1(E1) + Ch(E1,E,F)
//   once A1 ready A2   = Im3 + Sigma0(A1) + Maj(A1,A,B)   E2 = Im4
//
// The remaining outputs are moves: B2 = A1, C2 = A, D2 = B, F2 = E1, G2 = E,
// H2 = F. The split into Im1..Im4 follows the design's published equations;
// the grouping of operands inside each sum follows its block diagram, and a
// synthesis tool is free to rebalance it into carry-save form.
//
// Interface: s_in (A..H at round t), w0/k0 for round t, w1/k1 for round t+1,
// s_out (A..H after round t+1). No clock, no latency.
module sha512_op2
  import sha512_pkg::*;
(
  input  state_t s_in,
  input  word_t  w0,
  input  word_t  k0,
  input  word_t  w1,
  input  word_t  k1,
  output state_t s_out
);

  word_t t1, a1, e1;
  word_t im1, im2, im3, im4, e_part, a2;

  always_comb begin
    // First half: round t outputs.
    t1 = ((w0 + k0) + s_in.h) + (big_sigma1(s_in.e) + ch(s_in.e, s_in.f, s_in.g));
    a1 = (big_sigma0(s_in.a) + maj(s_in.a, s_in.b, s_in.c)) + t1;
    e1 = t1 + s_in.d;

    // First half, in parallel: round t+1 intermediates from inputs known now.
    im1 = (w1 + k1) + s_in.g;
    im2 = im1 + s_in.c;

    // As soon as E1 is known.
    e_part = big_sigma1(e1) + ch(e1, s_in.e, s_in.f);
    im3 = im1 + e_part;
    im4 = im2 + e_part;

    // Second half: only Sigma0/Maj of A1 and one final addition remain.
    a2 = im3 + (big_sigma0(a1) + maj(a1, s_in.a, s_in.b));

    s_out.a = a2;
    s_out.b = a1;
    s_out.c = s_in.a;
    s_out.d = s_in.b;
    s_out.e = im4;
    s_out.f = e1;
    s_out.g = s_in.e;
    s_out.h = s_in.f;
  end

endmodule
