// fifo_mem: the SRAM-style word storage of one FIFO buffer.
//
// DEPTH words of DATA_W bits, one write port and one read port. A write
// happens at the rising clock edge when wen is high. The read port is
// combinational and gated by the read enable: rdata shows word raddr while
// ren is high and reads as zero otherwise, so the read enable decides when
// the data-out line carries a word, as a read strobe does on an SRAM.
// The defaults (4-bit words, 6 words) follow the document: 4 bits is the word
// size of its worked example and 6 the buffer depth of its throughput study.
// The combinational, gated read port is this design's own choice. The array
// is not reset: a FIFO never reads a word it has not written, and the
// transparent test restores whatever the words held.
module fifo_mem #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned DEPTH  = 6,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wen,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              ren,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wen && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (ren && (int'(raddr) < DEPTH)) rdata = mem[raddr];
  end

endmodule
