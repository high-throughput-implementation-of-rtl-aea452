// sha512_pad: padding unit of the SHA-512 core.
//
// Takes a message as a stream of 64-bit words (valid/ready; first message byte
// in bits 63:56) and hands out padded 1024-bit blocks (valid/ready), marking
// the last block of the message with blk_final. Padding is that of the Secure
// Hash Standard: one 1 bit (the byte 0x80), zero bits, and the message length
// in bits as a 128-bit big-endian number in the last 16 bytes of the last
// block. When the message ends too late in a block for the length to fit, an
// extra all-padding block follows.
//
// The message is byte aligned. Every word but the last carries 8 bytes; the
// word with in_last carries in_bytes bytes (0..8) in its upper bytes; 0 allows
// the empty message. Bytes below those are ignored.
//
// Words are collected into a 16-word buffer, one per clock. After the last
// message word the unit writes one padding word per clock until the block is
// complete, so a block is ready at most 16 clocks after its last input word.
// While a block waits on blk_ready no input is taken. The bit counter is 128
// bits wide, covering every length the standard allows. Reset is synchronous,
// active low. The word-serial input and the buffering are this design's
// choices; the published architecture only names the unit.
module sha512_pad
  import sha512_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // message input
  input  logic               in_valid,
  output logic               in_ready,
  input  word_t              in_data,
  input  logic               in_last,
  input  logic [3:0]         in_bytes,
  // padded block output
  output logic               blk_valid,
  input  logic               blk_ready,
  output logic [BLOCK_W-1:0] blk_data,
  output logic               blk_final
);

  typedef enum logic [1:0] {S_COLLECT, S_PAD, S_FULL} pstate_e;

  pstate_e       state;
  word_t         buf_q [BLOCK_WORDS];
  logic [3:0]    wi;          // next word position in the block
  logic          need80;      // the 0x80 byte is still to be placed
  logic          padding;     // message ended; remaining blocks are padding
  logic          final_q;
  logic [127:0]  bit_len;

  logic          take;
  word_t         last_word;

  // Last message word: keep in_bytes upper bytes, place 0x80 right after them.
  always_comb begin
    last_word = '0;
    for (int i = 0; i < 8; i++) begin
      if (i < int'(in_bytes))
        last_word[63-8*i -: 8] = in_data[63-8*i -: 8];
      else if (i == int'(in_bytes))
        last_word[63-8*i -: 8] = 8'h80;
    end
  end

  always_comb begin
    in_ready  = (state == S_COLLECT);
    take      = in_valid && in_ready;
    blk_valid = (state == S_FULL);
    blk_final = final_q;
    for (int i = 0; i < BLOCK_WORDS; i++)
      blk_data[BLOCK_W-1-64*i -: 64] = buf_q[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_COLLECT;
      wi      <= '0;
      need80  <= 1'b0;
      padding <= 1'b0;
      final_q <= 1'b0;
      bit_len <= '0;
      for (int i = 0; i < BLOCK_WORDS; i++)
        buf_q[i] <= '0;
    end else begin
      unique case (state)
        S_COLLECT: if (take) begin
          if (in_last) begin
            buf_q[wi] <= last_word;
            bit_len   <= bit_len + 128'({in_bytes, 3'b000});
            need80    <= (in_bytes == 4'd8);
            padding   <= 1'b1;
          end else begin
            buf_q[wi] <= in_data;
            bit_len   <= bit_len + 128'd64;
          end
          wi <= wi + 4'd1;
          if (wi == 4'd15) begin
            state   <= S_FULL;
            final_q <= 1'b0;
          end else if (in_last) begin
            state <= S_PAD;
          end
        end
        S_PAD: begin
          if (wi == 4'd14 && !need80) begin
            buf_q[14] <= bit_len[127:64];
            buf_q[15] <= bit_len[63:0];
            wi        <= '0;
            final_q   <= 1'b1;
            state     <= S_FULL;
          end else begin
            buf_q[wi] <= need80 ? 64'h8000_0000_0000_0000 : 64'h0;
            need80    <= 1'b0;
            wi        <= wi + 4'd1;
            if (wi == 4'd15) begin
              final_q <= 1'b0;
              state   <= S_FULL;
            end
          end
        end
        S_FULL: if (blk_ready) begin
          if (final_q) begin
            state   <= S_COLLECT;
            padding <= 1'b0;
            final_q <= 1'b0;
            bit_len <= '0;
          end else begin
            state <= padding ? S_PAD : S_COLLECT;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
