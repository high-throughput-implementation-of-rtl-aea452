// tb_sha512_pad: sends messages of many lengths through the padding unit,
// with random gaps on the input and random back-pressure on the output, and
// compares every block and its final flag with the reference padding. The
// lengths include the boundary cases: empty, a multiple of the word size,
// 111 bytes (padding just fits), 112 bytes (an extra block is needed) and
// exact multiples of the block. It also checks that, without back-pressure,
// a block is offered no later than 16 clocks after its last message word.
module tb_sha512_pad;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic          clk = 0;
  logic          rst_n;
  logic          in_valid, in_ready, in_last, blk_valid, blk_ready, blk_final;
  logic [63:0]   in_data;
  logic [3:0]    in_bytes;
  logic [1023:0] blk_data;
  int checks = 0, failures = 0;
  int extra_blocks = 0;
  bit bp_on;
  int max_latency;
  int cyc_n = 0;

  typedef struct { logic [1023:0] data; bit fin; } exp_t;
  exp_t exp_q[$];

  sha512_pad dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .in_bytes,
                  .blk_valid, .blk_ready, .blk_data, .blk_final);

  always #5 clk = ~clk;
  always @(posedge clk) cyc_n++;

  // clocks from the last input word or block hand-over to the next block offer
  int  since = 0;
  bit  prev_valid = 0;
  always @(posedge clk) begin
    if (rst_n && !bp_on && blk_valid && !prev_valid && since > max_latency)
      max_latency = since;
    if ((in_valid && in_ready) || (blk_valid && blk_ready)) since = 1;
    else since++;
    prev_valid = blk_valid;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int len);
    byte unsigned msg[$];
    int nw;
    for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
    for (int b = 0; b < r_nblocks(len); b++) begin
      exp_t e;
      e.data = r_block(msg, b);
      e.fin  = (b == r_nblocks(len) - 1);
      exp_q.push_back(e);
    end
    if (r_nblocks(len) > (len + 127) / 128 && len % 128 != 0) extra_blocks++;
    nw = (len == 0) ? 1 : (len + 7) / 8;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      while (bp_on && ($urandom % 4 == 0)) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_last  = (w == nw - 1);
      in_bytes = in_last ? 4'(len - 8*w) : 4'd8;
      in_data  = {$urandom, $urandom};
      for (int i = 0; i < 8; i++)
        if (8*w + i < len) in_data[63-8*i -: 8] = msg[8*w + i];
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 0;
    end
  endtask

  // output side
  initial begin
    blk_ready = 0;
    forever begin
      @(negedge clk);
      blk_ready = bp_on ? ($urandom % 3 == 0) : 1'b1;
      if (blk_valid && blk_ready) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected block");
        end else begin
          exp_t e;
          e = exp_q.pop_front();
          if (blk_data !== e.data || blk_final !== e.fin) begin
            failures++;
            $display("block mismatch fin=%0d/%0d\n got %h\n exp %h", blk_final, e.fin, blk_data, e.data);
          end
        end
      end
    end
  end

  initial begin
    int lens[] = '{0, 1, 3, 7, 8, 9, 16, 64, 100, 111, 112, 113, 119, 120, 127, 128,
                   129, 239, 240, 255, 256, 300, 383, 384};
    rst_n = 0; in_valid = 0; in_last = 0; in_bytes = 0; in_data = 0;
    bp_on = 0; max_latency = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (lens[i]) send(lens[i]);
    repeat (40) @(negedge clk);
    bp_on = 1;
    for (int n = 0; n < 30; n++) send($urandom % 400);
    repeat (200) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d blocks missing", exp_q.size()); end
    checks++;
    if (max_latency > 16 || max_latency == 0) begin
      failures++; $display("block latency %0d clocks", max_latency);
    end
    checks++;
    if (extra_blocks == 0) begin failures++; $display("extra padding block never exercised"); end
    $display("max latency %0d, extra padding blocks %0d", max_latency, extra_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
