// sha512_msram: message schedule RAM (MS RAM) of the SHA-512 core.
//
// Stores the schedule words W_0..W_79 of a block as DEPTH entries of two
// words each, one entry per condensed cycle of the two-round operation block.
// NBANKS banks are kept so that the schedule of the next block can be written
// while the operation block reads the current one; with two banks the
// schedule generator and the rounds overlap fully and a block enters every
// 40 clocks.
//
// One write port (we, wbank, waddr, wdata) written on the rising clock edge,
// and one read port (rbank, raddr) with combinational read (distributed RAM
// style), so the word pair for cycle c is on rdata during cycle c. Contents
// are not reset. The entry width, depth and use of two banks are this
// design's choices; the published architecture only says that the RAM holds
// the W_t words.
module sha512_msram #(
  parameter int unsigned DEPTH  = 40,
  parameter int unsigned NBANKS = 2,
  parameter int unsigned WIDTH  = 128,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned BW = (NBANKS > 1) ? $clog2(NBANKS) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [BW-1:0]    wbank,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [BW-1:0]    rbank,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [NBANKS][DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[wbank][waddr] <= wdata;
  end

  assign rdata = mem[rbank][raddr];

endmodule
