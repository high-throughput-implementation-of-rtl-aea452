// sha512_ctrl: control unit of the SHA-512 core.
//
// Runs two sequences that overlap through the two banks of the schedule RAM:
//
//  * Schedule fill. When the padding unit offers a block (blk_valid) and a
//    bank is free, the block is taken (blk_ready, wg_load) and for the next
//    40 clocks the schedule generator steps (wg_step) while each word pair is
//    written to that bank at addresses 0..39 (ram_we, ram_wbank, ram_waddr).
//    A new block can be taken in the last fill clock, so the fill side also
//    manages one block every 40 clocks.
//  * Rounds. When a bank is full, the operation block runs for 40 clocks
//    (rd_en) reading address rd_cyc of bank rd_bank; rd_cyc also indexes the
//    round constants. In the 40th clock rd_last is high: the digest logic
//    adds the result to the hash value, the bank is released, and if the
//    other bank is full the next block starts in the following clock.
//
// Each bank carries the padding unit's "last block of the message" flag,
// presented as rd_final while that bank is read. Reset is synchronous, active
// low. The sequencing and the two-bank overlap are this design's own; the
// published architecture names the control unit without its insides.
module sha512_ctrl
  import sha512_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // block intake from the padding unit
  input  logic       blk_valid,
  input  logic       blk_final,
  output logic       blk_ready,
  // schedule generator and RAM write port
  output logic       wg_load,
  output logic       wg_step,
  output logic       ram_we,
  output logic       ram_wbank,
  output logic [5:0] ram_waddr,
  // rounds: RAM read port, constants index, core and digest control
  output logic       rd_en,
  output logic       rd_bank,
  output logic [5:0] rd_cyc,
  output logic       rd_last,
  output logic       rd_final
);

  localparam logic [5:0] LAST_CYC = 6'(CYCLES - 1);

  logic       wg_busy;
  logic [5:0] wg_cnt;
  logic       wr_bank;
  logic [1:0] bank_full;
  logic [1:0] bank_final;
  logic       rd_active;
  logic [5:0] rd_cnt;

  logic wg_last, b_next, accept;

  always_comb begin
    wg_last   = wg_busy && (wg_cnt == LAST_CYC);
    rd_last   = rd_active && (rd_cnt == LAST_CYC);
    b_next    = wg_busy ? ~wr_bank : wr_bank;
    blk_ready = (!wg_busy || wg_last) &&
                (!bank_full[b_next] || (rd_last && rd_bank == b_next));
    accept    = blk_valid && blk_ready;

    wg_load   = accept;
    wg_step   = wg_busy;
    ram_we    = wg_busy;
    ram_wbank = wr_bank;
    ram_waddr = wg_cnt;

    rd_en     = rd_active;
    rd_cyc    = rd_cnt;
    rd_final  = bank_final[rd_bank];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wg_busy    <= 1'b0;
      wg_cnt     <= '0;
      wr_bank    <= 1'b0;
      bank_full  <= '0;
      bank_final <= '0;
      rd_active  <= 1'b0;
      rd_cnt     <= '0;
      rd_bank    <= 1'b0;
    end else begin
      // schedule fill side
      if (accept)
        bank_final[b_next] <= blk_final;
      if (wg_busy) begin
        if (wg_last) begin
          wg_busy <= accept;
          wg_cnt  <= '0;
          wr_bank <= ~wr_bank;
        end else begin
          wg_cnt  <= wg_cnt + 6'd1;
        end
      end else if (accept) begin
        wg_busy <= 1'b1;
        wg_cnt  <= '0;
      end

      // round side
      if (rd_active) begin
        if (rd_last) begin
          rd_bank   <= ~rd_bank;
          rd_cnt    <= '0;
          // continue at once if the other bank is full or completes now
          rd_active <= bank_full[~rd_bank] || (wg_last && wr_bank == ~rd_bank);
        end else begin
          rd_cnt    <= rd_cnt + 6'd1;
        end
      end else if (bank_full[rd_bank]) begin
        rd_active <= 1'b1;
        rd_cnt    <= '0;
      end

      // bank occupancy: set when its fill completes, cleared when read out
      for (int b = 0; b < 2; b++) begin
        if (wg_last && wr_bank == 1'(b))
          bank_full[b] <= 1'b1;
        else if (rd_last && rd_bank == 1'(b))
          bank_full[b] <= 1'b0;
      end
    end
  end

  // The fill side never writes a bank that still holds an unread schedule,
  // and the rounds only read a bank whose schedule is complete.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    ram_we |-> !bank_full[ram_wbank]);
  a_read_full: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> bank_full[rd_bank]);

endmodule
