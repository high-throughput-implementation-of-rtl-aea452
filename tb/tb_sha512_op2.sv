// tb_sha512_op2: checks the two-round operation block against two plain
// SHA-512 rounds of the reference model, for random states, schedule words
// and constants, plus all-zero and all-one corner inputs.
module tb_sha512_op2;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  state_t s_in, s_out;
  word_t  w0, k0, w1, k1;
  int checks = 0, failures = 0;

  sha512_op2 dut (.s_in, .w0, .k0, .w1, .k1, .s_out);

  function automatic word_t rnd64();
    return {$urandom, $urandom};
  endfunction

  task automatic check_one();
    st512_t exp;
    #1;
    exp = r_round(r_round(st512_t'(s_in), w0, k0), w1, k1);
    checks++;
    if (st512_t'(s_out) !== exp) begin
      failures++;
      $display("MISMATCH in=%h got=%h exp=%h", s_in, s_out, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_in = '0; w0 = '0; k0 = '0; w1 = '0; k1 = '0;
    check_one();
    s_in = '1; w0 = '1; k0 = '1; w1 = '1; k1 = '1;
    check_one();
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 8; i++) s_in[511-64*i -: 64] = rnd64();
      w0 = rnd64(); k0 = rnd64(); w1 = rnd64(); k1 = rnd64();
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
