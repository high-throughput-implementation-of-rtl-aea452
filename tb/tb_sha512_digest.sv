// tb_sha512_digest: drives the digest extraction with random round results.
// Checks that H starts at the initial value, accumulates H + result over the
// blocks of a message (seen on `chain`), outputs H + result as the digest
// with a one-clock valid pulse after the final block, and returns to the
// initial value for the next message. Clocks without `last` change nothing.
module tb_sha512_digest;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic         clk = 0;
  logic         rst_n, last, final_blk;
  state_t       nxt, iv, chain;
  logic [511:0] digest;
  logic         digest_valid;
  st512_t       hv;
  int checks = 0, failures = 0, pulses = 0;

  sha512_digest dut (.clk, .rst_n, .last, .final_blk, .nxt, .iv, .chain, .digest, .digest_valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && digest_valid) pulses++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic st512_t rnd_st();
    st512_t s;
    for (int i = 0; i < 16; i++) s[32*i +: 32] = $urandom;
    return s;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; last = 0; final_blk = 0; nxt = '0;
    iv = state_t'(r_iv_state());
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      hv = r_iv_state();
      for (int b = 0; b <= m % 3; b++) begin
        final_blk = (b == m % 3);
        // idle clocks with a random result on nxt change nothing
        last = 0; nxt = state_t'(rnd_st());
        @(negedge clk);
        chk(!digest_valid, "spurious valid");
        nxt = state_t'(rnd_st());
        last = 1;
        #1;
        chk(st512_t'(chain) === (final_blk ? r_iv_state() : r_add(hv, st512_t'(nxt))), "chain value");
        hv = r_add(hv, st512_t'(nxt));
        @(negedge clk);
        last = 0;
        if (final_blk) begin
          chk(digest_valid === 1'b1, "valid pulse");
          chk(digest === hv, $sformatf("digest of message %0d", m));
          @(negedge clk);
          chk(digest_valid === 1'b0, "pulse one clock");
          chk(digest === hv, "digest held");
        end else begin
          chk(digest_valid === 1'b0, "no valid mid-message");
        end
      end
    end
    chk(pulses == 6, "one pulse per message");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
