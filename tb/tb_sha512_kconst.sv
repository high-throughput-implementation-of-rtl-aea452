// tb_sha512_kconst: checks every round constant pair and the initial hash
// value of the constants' array against values the reference model derives
// from the primes (cube and square roots), and that out-of-range indices
// read as zero.
module tb_sha512_kconst;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic [5:0] cyc;
  word_t      k0, k1;
  state_t     iv;
  int checks = 0, failures = 0;

  sha512_kconst dut (.cyc, .k0, .k1, .iv);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++) begin
      cyc = 6'(c);
      #1;
      checks += 2;
      if (c < 40) begin
        if (k0 !== r_k(2*c))   begin failures++; $display("K[%0d] got %h exp %h", 2*c, k0, r_k(2*c)); end
        if (k1 !== r_k(2*c+1)) begin failures++; $display("K[%0d] got %h exp %h", 2*c+1, k1, r_k(2*c+1)); end
      end else begin
        if (k0 !== '0 || k1 !== '0) begin failures++; $display("cyc %0d not zero", c); end
      end
    end
    checks++;
    if (st512_t'(iv) !== r_iv_state()) begin
      failures++;
      $display("IV got %h exp %h", iv, r_iv_state());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
