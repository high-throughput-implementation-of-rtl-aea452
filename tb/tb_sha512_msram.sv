// tb_sha512_msram: writes random word pairs to both banks of the schedule
// RAM, then reads every entry back and compares with a shadow copy; also
// checks that a write to one bank leaves the other bank alone and that the
// read is combinational (data visible in the same clock as the address).
module tb_sha512_msram;
  localparam int DEPTH = 40;

  logic         clk = 0;
  logic         we;
  logic         wbank, rbank;
  logic [5:0]   waddr, raddr;
  logic [127:0] wdata, rdata;
  logic [127:0] shadow [2][DEPTH];
  int checks = 0, failures = 0;

  sha512_msram #(.DEPTH(DEPTH), .NBANKS(2), .WIDTH(128)) dut (
    .clk, .we, .wbank, .waddr, .wdata, .rbank, .raddr, .rdata
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int b, input int a, input logic [127:0] d);
    @(negedge clk);
    we = 1; wbank = 1'(b); waddr = 6'(a); wdata = d;
    @(posedge clk);
    #1 we = 0;
    shadow[b][a] = d;
  endtask

  task automatic check_all();
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++) begin
        rbank = 1'(b); raddr = 6'(a);
        #1;
        checks++;
        if (rdata !== shadow[b][a]) begin
          failures++;
          $display("bank %0d addr %0d got %h exp %h", b, a, rdata, shadow[b][a]);
        end
      end
  endtask

  initial begin
    we = 0; wbank = 0; rbank = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < DEPTH; a++)
        write(b, a, {$urandom, $urandom, $urandom, $urandom});
    check_all();
    // rewrite bank 0 only, bank 1 must be unchanged
    for (int a = 0; a < DEPTH; a++)
      write(0, a, {$urandom, $urandom, $urandom, $urandom});
    check_all();
    // same-clock read of a freshly written entry
    write(1, 7, 128'h0123456789abcdef_fedcba9876543210);
    rbank = 1; raddr = 7;
    #1;
    checks++;
    if (rdata !== 128'h0123456789abcdef_fedcba9876543210) begin
      failures++;
      $display("read-after-write failed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
