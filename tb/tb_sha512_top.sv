// tb_sha512_top: end-to-end test of the SHA-512 core at its only
// configuration. Hashes the two published test messages of the standard
// ("abc" and the 112-byte two-block message) against their printed digests,
// then messages of many lengths, sent back to back or with random input
// gaps, against the reference model. Also checks the rate: a long message
// sent without gaps is hashed at one 1024-bit block per 40 clocks.
//
// Every mechanism of the design is counted and must occur at least once:
// chaining across blocks of one message, an extra padding-only block, the
// empty message, input back-pressure, blocks following each other with no
// idle clock, and a new message starting right after the previous one's
// final block (hash value reloaded without an idle clock).
module tb_sha512_top;
  import sha512_ref_pkg::*;

  logic         clk = 0;
  logic         rst_n;
  logic         in_valid, in_ready, in_last;
  logic [63:0]  in_data;
  logic [3:0]   in_bytes;
  logic [511:0] digest;
  logic         digest_valid, busy;

  int checks = 0, failures = 0;
  logic [511:0] exp_q[$];
  int  cyc_n = 0, digests = 0;
  bit  gaps;

  // mechanism counters
  int n_chain = 0, n_extra = 0, n_empty = 0, n_stall = 0, n_b2b = 0, n_msg_b2b = 0;
  int last_rd_last = -100;
  bit prev_final_last = 0;

  sha512_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_last, .in_bytes,
                  .digest, .digest_valid, .busy);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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
    if (in_valid && !in_ready) n_stall++;
    if (dut.rd_en && prev_final_last) n_msg_b2b++;
    if (dut.rd_last) begin
      if (!dut.rd_final) n_chain++;
      if (cyc_n - last_rd_last == 40) n_b2b++;
      last_rd_last = cyc_n;
    end
    prev_final_last = dut.rd_last && dut.rd_final;
    if (digest_valid) begin
      digests++;
      chk(exp_q.size() > 0, "digest without a message");
      if (exp_q.size() > 0) begin
        logic [511:0] e;
        e = exp_q.pop_front();
        chk(digest === e, $sformatf("digest %0d", digests));
        if (digest !== e) $display("  got %h\n  exp %h", digest, e);
      end
    end
  end

  task automatic send(input byte unsigned msg[$]);
    int len, nw;
    len = msg.size();
    exp_q.push_back(r_sha512(msg));
    if (len == 0) n_empty++;
    if (len % 128 >= 112) n_extra++;
    nw = (len == 0) ? 1 : (len + 7) / 8;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      while (gaps && ($urandom % 3 == 0)) begin
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

  function automatic void str2q(input string s, ref byte unsigned q[$]);
    q = {};
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

  task automatic send_random(input int len);
    byte unsigned m[$];
    for (int i = 0; i < len; i++) m.push_back(8'($urandom));
    send(m);
  endtask

  task automatic drain();
    while (exp_q.size() > 0) @(negedge clk);
  endtask

  initial begin
    byte unsigned m[$];
    int t0, nblk;
    rst_n = 0; in_valid = 0; in_last = 0; in_bytes = 0; in_data = 0; gaps = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // published test vectors of the standard
    str2q("abc", m);
    send(m);
    drain();
    chk(digest === 512'hddaf35a193617abacc417349ae20413112e6fa4e89a97ea20a9eeee64b55d39a2192992a274fc1a836ba3c23a3feebbd454d4423643ce80e2a9ac94fa54ca49f,
        "FIPS 180-2 one-block example");
    str2q({"abcdefghbcdefghicdefghijdefghijkefghijklfghijklmghijklmnhijklmno",
           "ijklmnopjklmnopqklmnopqrlmnopqrsmnopqrstnopqrstu"}, m);
    send(m);
    drain();
    chk(digest === 512'h8e959b75dae313da8cf4f72814fc143f8f7779c6eb9f7fa17299aeadb6889018501d289e4900f7e4331b99dec4b5433ac7d329eeb6dd26545e96e55b874be909,
        "FIPS 180-2 two-block example");

    // rate: a 12-block message with no input gaps
    nblk = 12;
    t0 = cyc_n;
    send_random(nblk * 128 - 17);
    drain();
    $display("%0d-block message: %0d clocks from first word to digest", nblk, cyc_n - t0);
    chk(cyc_n - t0 <= 40 * nblk + 16 + 16 + 41 + 4, "one block per 40 clocks");

    // lengths around the block and padding boundaries, back to back
    send_random(0);
    send_random(1);
    send_random(8);
    send_random(111);
    send_random(112);
    send_random(127);
    send_random(128);
    send_random(239);
    send_random(240);
    send_random(256);
    drain();

    // random lengths with random input gaps
    gaps = 1;
    for (int n = 0; n < 12; n++) send_random($urandom % 500);
    drain();
    repeat (10) @(negedge clk);

    chk(!busy, "idle at the end");
    chk(n_chain > 0, "chaining across blocks");
    chk(n_extra > 0, "extra padding block");
    chk(n_empty > 0, "empty message");
    chk(n_stall > 0, "input back-pressure");
    chk(n_b2b > 0, "back-to-back blocks");
    chk(n_msg_b2b > 0, "next message right after a final block");
    $display("digests %0d; chained blocks %0d, extra-pad messages %0d, empty %0d, stall clocks %0d, back-to-back blocks %0d, back-to-back messages %0d",
             digests, n_chain, n_extra, n_empty, n_stall, n_b2b, n_msg_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
