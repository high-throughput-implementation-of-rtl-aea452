// sha512_digest: message digest extraction of the SHA-512 core.
//
// Keeps the intermediate hash value H(i) (eight 64-bit words, reset to the
// initial hash value). In the last condensed cycle of a block (`last`) it
// adds the operation block's result `nxt` to H word by word (mod 2^64):
//   - block not the last of its message: H <= H + nxt; the same sum is
//     offered on `chain` for the working-variable register;
//   - last block of a message (`final_blk`): the sum is the 512-bit message
//     digest, registered on `digest` with a one-clock `digest_valid` pulse
//     in the next clock; H and `chain` return to the initial value `iv` so
//     the next message can start at once.
// `digest` holds its value until the next digest. There is no back-pressure
// on the digest output. The digest is H0..H7 with H0 in bits 511:448.
module sha512_digest
  import sha512_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         last,
  input  logic         final_blk,
  input  state_t       nxt,
  input  state_t       iv,
  output state_t       chain,
  output logic [511:0] digest,
  output logic         digest_valid
);

  state_t hv, sum;

  always_comb begin
    sum.a = hv.a + nxt.a;
    sum.b = hv.b + nxt.b;
    sum.c = hv.c + nxt.c;
    sum.d = hv.d + nxt.d;
    sum.e = hv.e + nxt.e;
    sum.f = hv.f + nxt.f;
    sum.g = hv.g + nxt.g;
    sum.h = hv.h + nxt.h;
    chain = final_blk ? iv : sum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hv           <= IV;
      digest       <= '0;
      digest_valid <= 1'b0;
    end else begin
      digest_valid <= 1'b0;
      if (last) begin
        hv <= chain;
        if (final_blk) begin
          digest       <= sum;
          digest_valid <= 1'b1;
        end
      end
    end
  end

endmodule
