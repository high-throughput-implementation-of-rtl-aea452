// tb_sha512_core: runs the 80-operation unit over random blocks. The core
// reads its constants from the constants' array and its schedule words from
// the reference schedule. After each clock the register must hold the state
// of the reference model after two more rounds; the block takes exactly 40
// enabled clocks. In the 40th clock `load` puts a new value in the register,
// which the next block starts from. Idle clocks (en low) must hold the state,
// and reset must give the initial hash value.
module tb_sha512_core;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic          clk = 0;
  logic          rst_n, en, load;
  state_t        load_val, st, nxt;
  logic [5:0]    cyc;
  word_t         w0, w1, k0, k1, kk0, kk1;
  state_t        iv;
  logic [1023:0] blk;
  st512_t        ref_s;
  int checks = 0, failures = 0;

  sha512_kconst u_k (.cyc, .k0, .k1, .iv);
  sha512_core dut (.clk, .rst_n, .en, .load, .load_val, .w0, .k0, .w1, .k1, .st, .nxt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1023:0] rnd_block();
    logic [1023:0] b;
    for (int i = 0; i < 32; i++) b[32*i +: 32] = $urandom;
    return b;
  endfunction

  task automatic expect_state(input st512_t exp, input string what);
    checks++;
    if (st512_t'(st) !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, st, exp);
    end
  endtask

  initial begin
    rst_n = 0; en = 0; load = 0; load_val = '0; cyc = 0; w0 = 0; w1 = 0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    expect_state(r_iv_state(), "reset");
    ref_s = r_iv_state();
    for (int n = 0; n < 5; n++) begin
      blk = rnd_block();
      for (int c = 0; c < 40; c++) begin
        en = 1;
        cyc = 6'(c);
        w0 = r_sched(blk, 2*c);
        w1 = r_sched(blk, 2*c+1);
        load = (c == 39);
        for (int i = 0; i < 8; i++) load_val[511-64*i -: 64] = {$urandom, $urandom};
        @(negedge clk);
        ref_s = r_round(r_round(ref_s, w0, r_k(2*c)), w1, r_k(2*c+1));
        if (c < 39) expect_state(ref_s, $sformatf("block %0d cycle %0d", n, c));
        else begin
          // the 40th cycle's result was on nxt; the register took load_val
          expect_state(st512_t'(load_val), "load");
          ref_s = st512_t'(load_val);
        end
      end
      // idle clocks hold the state
      en = 0; load = 0;
      repeat (2) @(negedge clk);
      expect_state(ref_s, "hold");
    end
    // the last cycle's result must match a full reference compression
    blk = rnd_block();
    for (int c = 0; c < 40; c++) begin
      en = 1; cyc = 6'(c);
      w0 = r_sched(blk, 2*c); w1 = r_sched(blk, 2*c+1);
      load = 0;
      #1;
      if (c == 39) begin
        checks++;
        if (st512_t'(nxt) !== r_compress(ref_s, blk)) begin
          failures++; $display("full compression mismatch");
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
