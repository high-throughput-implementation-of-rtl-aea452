// sha512_top: SHA-512 hash core with a partially unrolled operation block.
//
// A message enters as 64-bit words and leaves as a 512-bit digest. Inside:
//
//   padding unit -> schedule generator -> schedule RAM (two banks)
//                -> 80-operation unit (two rounds per clock) -> digest extraction
//
// with the constants' array supplying K_t and the initial hash value and the
// control unit sequencing all of it. One 1024-bit block takes 40 clocks in the
// operation block; filling the schedule of the next block overlaps with that,
// so a long message is hashed at 1024 bits per 40 clocks. The first block of a
// message reaches the operation block 41 clocks after the padding unit offers
// it, and the digest appears one clock after the 40th round cycle of the last
// block.
//
// Ports
//   in_valid/in_ready/in_data/in_last/in_bytes: message words, first byte in
//     bits 63:56; in_last marks the last word, which carries in_bytes (0..8)
//     bytes. A new message may follow directly.
//   digest/digest_valid: digest H0..H7 (H0 in bits 511:448), valid for one
//     clock per message; digest holds its value afterwards.
//   busy: a block is being filled or hashed.
// Reset is synchronous and active low.
module sha512_top
  import sha512_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [63:0]  in_data,
  input  logic         in_last,
  input  logic [3:0]   in_bytes,
  output logic [511:0] digest,
  output logic         digest_valid,
  output logic         busy
);

  logic               blk_valid, blk_ready, blk_final;
  logic [BLOCK_W-1:0] blk_data;
  logic               wg_load, wg_step;
  logic               ram_we, ram_wbank, rd_bank;
  logic [5:0]         ram_waddr, rd_cyc;
  logic               rd_en, rd_last, rd_final;
  word_t              wg_w0, wg_w1, k0, k1;
  logic [127:0]       ram_rdata;
  state_t             iv, st, nxt, chain;

  sha512_pad u_pad (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_last, .in_bytes,
    .blk_valid, .blk_ready, .blk_data, .blk_final
  );

  sha512_ctrl u_ctrl (
    .clk, .rst_n,
    .blk_valid, .blk_final, .blk_ready,
    .wg_load, .wg_step, .ram_we, .ram_wbank, .ram_waddr,
    .rd_en, .rd_bank, .rd_cyc, .rd_last, .rd_final
  );

  sha512_wgen u_wgen (
    .clk,
    .load (wg_load),
    .block(blk_data),
    .step (wg_step),
    .w0   (wg_w0),
    .w1   (wg_w1)
  );

  sha512_msram #(.DEPTH(CYCLES), .NBANKS(2), .WIDTH(128)) u_msram (
    .clk,
    .we   (ram_we),
    .wbank(ram_wbank),
    .waddr(ram_waddr),
    .wdata({wg_w0, wg_w1}),
    .rbank(rd_bank),
    .raddr(rd_cyc),
    .rdata(ram_rdata)
  );

  sha512_kconst u_kconst (
    .cyc(rd_cyc),
    .k0,
    .k1,
    .iv
  );

  sha512_core u_core (
    .clk, .rst_n,
    .en      (rd_en),
    .load    (rd_last),
    .load_val(chain),
    .w0      (ram_rdata[127:64]),
    .k0,
    .w1      (ram_rdata[63:0]),
    .k1,
    .st,
    .nxt
  );

  sha512_digest u_digest (
    .clk, .rst_n,
    .last     (rd_last),
    .final_blk(rd_final),
    .nxt,
    .iv,
    .chain,
    .digest,
    .digest_valid
  );

  assign busy = wg_step || rd_en || blk_valid;

endmodule
