// test_mux: hands the FIFO memory to either the normal logic or the test circuit.
//
// With test_ctrl low the memory's write enable, read enable, addresses and
// write data come from the FIFO's own logic (wen_int, ren_int, the pointers
// and the data-in line); with test_ctrl high they come from the test circuit.
// The write- and read-enable selectors are the two multiplexers the document
// calls mu6 and mu7. Selecting the addresses and the write data the same way
// is needed for the test to reach every word and is this design's reading of
// the remaining multiplexers the document mentions without detail. Purely
// combinational.
module test_mux #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned DEPTH  = 6,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              test_ctrl,
  // normal operation
  input  logic              wen_int,
  input  logic              ren_int,
  input  logic [AW-1:0]     waddr_int,
  input  logic [AW-1:0]     raddr_int,
  input  logic [DATA_W-1:0] wdata_int,
  // test circuit
  input  logic              wen_tst,
  input  logic              ren_tst,
  input  logic [AW-1:0]     addr_tst,
  input  logic [DATA_W-1:0] wdata_tst,
  // to the memory
  output logic              wen,
  output logic              ren,
  output logic [AW-1:0]     waddr,
  output logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] wdata
);

  // mu6: write enable, mu7: read enable
  assign wen   = test_ctrl ? wen_tst   : wen_int;
  assign ren   = test_ctrl ? ren_tst   : ren_int;
  assign waddr = test_ctrl ? addr_tst  : waddr_int;
  assign raddr = test_ctrl ? addr_tst  : raddr_int;
  assign wdata = test_ctrl ? wdata_tst : wdata_int;

endmodule
