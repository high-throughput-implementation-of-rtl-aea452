// sha512_kconst: constants' array of the SHA-512 core.
//
// A hardwired read-only array. For condensed cycle `cyc` (0..39) it gives the
// round constants of the two rounds computed in that cycle, K[2*cyc] and
// K[2*cyc+1], and it always presents the initial hash value H(0). The values
// are those of the Secure Hash Standard (see sha512_pkg). Combinational, no
// latency; an index above 39 reads as zero constants.
module sha512_kconst
  import sha512_pkg::*;
(
  input  logic [5:0] cyc,
  output word_t      k0,
  output word_t      k1,
  output state_t     iv
);

  always_comb begin
    k0 = '0;
    k1 = '0;
    if (cyc < 6'(CYCLES)) begin
      k0 = K[{cyc, 1'b0}];
      k1 = K[{cyc, 1'b1}];
    end
    iv = IV;
  end

endmodule
