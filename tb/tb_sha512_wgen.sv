// tb_sha512_wgen: loads random 1024-bit blocks into the schedule generator
// and checks that 40 steps present W[0..79] in pairs on w0/w1, one pair per
// clock, against the reference schedule. A second block is loaded in the
// same clock as the last step of the first, as the control unit does.
module tb_sha512_wgen;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic          clk = 0;
  logic          load, step;
  logic [1023:0] block, blk_a, blk_b;
  word_t         w0, w1;
  int checks = 0, failures = 0;

  sha512_wgen dut (.clk, .load, .block, .step, .w0, .w1);

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

  // Runs 40 step clocks over blk; in the last one optionally loads nxt_blk.
  task automatic run_block(input logic [1023:0] blk, input bit load_next,
                           input logic [1023:0] nxt_blk);
    for (int c = 0; c < 40; c++) begin
      @(negedge clk);
      step = 1;
      load = (c == 39) && load_next;
      block = nxt_blk;
      #1;
      checks += 2;
      if (w0 !== r_sched(blk, 2*c)) begin
        failures++; $display("W[%0d] got %h exp %h", 2*c, w0, r_sched(blk, 2*c));
      end
      if (w1 !== r_sched(blk, 2*c+1)) begin
        failures++; $display("W[%0d] got %h exp %h", 2*c+1, w1, r_sched(blk, 2*c+1));
      end
    end
    @(negedge clk);
    step = 0; load = 0;
  endtask

  initial begin
    load = 0; step = 0; block = '0;
    for (int n = 0; n < 4; n++) begin
      blk_a = rnd_block();
      blk_b = rnd_block();
      @(negedge clk);
      load = 1; block = blk_a;
      @(negedge clk);
      load = 0;
      // idle clocks must not move the window
      repeat (3) @(negedge clk);
      run_block(blk_a, 1'b1, blk_b);
      run_block(blk_b, 1'b0, '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
