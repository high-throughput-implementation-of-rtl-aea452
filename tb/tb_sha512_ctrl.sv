// tb_sha512_ctrl: drives the control unit with a block source that is either
// always ready or random, and checks its sequencing against a scoreboard:
// every accepted block is filled into one bank at addresses 0..39 in 40
// consecutive clocks; the rounds read the banks in the same order, addresses
// 0..39 in 40 consecutive clocks, only after the fill finished, with
// rd_last in the 40th clock and the block's final flag on rd_final. With a
// source that never runs dry the rounds must run back to back: one block
// every 40 clocks. Back-pressure to the source must occur.
module tb_sha512_ctrl;
  logic       clk = 0;
  logic       rst_n;
  logic       blk_valid, blk_final, blk_ready;
  logic       wg_load, wg_step, ram_we, ram_wbank;
  logic [5:0] ram_waddr, rd_cyc;
  logic       rd_en, rd_bank, rd_last, rd_final;
  int checks = 0, failures = 0;

  typedef struct { bit bank; bit fin; } fill_t;
  bit     acc_q[$];
  fill_t  filled_q[$];
  int     fill_cnt = 0, rd_cnt = 0;
  bit     fill_bank;
  fill_t  cur_rd;
  int     accepted = 0, read_blocks = 0, stalls = 0;
  int     last_rd_last = -1, cyc_n = 0, b2b = 0;
  bit     continuous;

  sha512_ctrl dut (.clk, .rst_n, .blk_valid, .blk_final, .blk_ready,
                   .wg_load, .wg_step, .ram_we, .ram_wbank, .ram_waddr,
                   .rd_en, .rd_bank, .rd_cyc, .rd_last, .rd_final);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc_n, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc_n++;
    if (blk_valid && !blk_ready) stalls++;
    chk(wg_load == (blk_valid && blk_ready), "wg_load is the accept");
    chk(wg_step == ram_we, "step with write");
    if (blk_valid && blk_ready) begin
      acc_q.push_back(blk_final);
      accepted++;
    end
    if (ram_we) begin
      if (fill_cnt == 0) fill_bank = ram_wbank;
      chk(ram_wbank == fill_bank, "fill stays in one bank");
      chk(ram_waddr == 6'(fill_cnt), "fill address");
      fill_cnt++;
      if (fill_cnt == 40) begin
        fill_t f;
        f.bank = fill_bank;
        chk(acc_q.size() > 0, "fill without accepted block");
        f.fin = acc_q.size() > 0 ? acc_q.pop_front() : 1'b0;
        filled_q.push_back(f);
        fill_cnt = 0;
      end
    end else begin
      chk(fill_cnt == 0, "fill interrupted");
    end
    if (rd_en) begin
      if (rd_cnt == 0) begin
        chk(filled_q.size() > 0, "read before fill complete");
        if (filled_q.size() > 0) cur_rd = filled_q.pop_front();
      end
      chk(rd_bank == cur_rd.bank, "read bank order");
      chk(rd_cyc == 6'(rd_cnt), "read address");
      chk(rd_final == cur_rd.fin, "final flag");
      chk(rd_last == (rd_cnt == 39), "rd_last position");
      rd_cnt++;
      if (rd_cnt == 40) begin
        rd_cnt = 0;
        read_blocks++;
        if (continuous && last_rd_last >= 0) begin
          chk(cyc_n - last_rd_last == 40, "back-to-back blocks every 40 clocks");
          b2b++;
        end
        last_rd_last = cyc_n;
      end
    end else begin
      chk(rd_cnt == 0, "round run interrupted");
      chk(!rd_last, "rd_last without rd_en");
    end
  end

  initial begin
    rst_n = 0; blk_valid = 0; blk_final = 0; continuous = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: a source that never runs dry
    continuous = 1;
    blk_valid = 1;
    for (int n = 0; n < 12; n++) begin
      blk_final = 1'($urandom);
      do @(negedge clk); while (!(accepted > n));
    end
    blk_valid = 0;
    repeat (200) @(negedge clk);
    continuous = 0;
    // phase 2: random source
    for (int n = 0; n < 10; n++) begin
      repeat ($urandom % 60) @(negedge clk);
      blk_valid = 1; blk_final = 1'($urandom);
      do @(posedge clk); while (!blk_ready);
      @(negedge clk);
      blk_valid = 0;
    end
    repeat (200) @(negedge clk);
    chk(read_blocks == accepted, "every accepted block was hashed");
    chk(b2b >= 8, "back-to-back operation seen");
    chk(stalls > 0, "back-pressure seen");
    $display("accepted %0d, read %0d, back-to-back %0d, stall clocks %0d", accepted, read_blocks, b2b, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
