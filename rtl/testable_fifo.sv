// testable_fifo: a NoC router input buffer with a transparent online memory test.
//
// One data channel of a router: flits arrive on the data-in line, wait in an
// SRAM-style FIFO of DEPTH words and leave on the data-out line when the
// neighbouring switch asks for them. Next to the FIFO sits a test circuit that
// runs the transparent SOA-MATS++ march over every word of the memory while
// the router is in the field, finding permanent stuck-at, transition and
// read-disturb faults without losing the stored flits. A scheduler starts a
// test every TEST_PERIOD cycles (or on test_req). While test_ctrl is high the
// multiplexers give the memory's enables, addresses and write data to the test
// circuit and the buffer neither accepts nor delivers flits; the stored flits
// are back in place when the test ends, 5*DEPTH cycles later.
// Interface: valid/ready on both flit ports; a flit moves at the rising edge
// of a cycle with valid and ready high. out_data is meaningful only in such a
// cycle (it is gated by the read enable). fault stays high once a fault has
// been found and fault_addr names the first failing word.
// The architecture (FIFO memory, internal enables wen_int/ren_int,
// multiplexers driven by test_ctrl, temp register, the march) follows the
// document; the handshake, the stalling of traffic during a test, the single
// clock shared by router and test circuit and the fault outputs are this
// design's choices.
module testable_fifo #(
  parameter int unsigned DATA_W      = 4,
  parameter int unsigned DEPTH       = 6,
  parameter int unsigned TEST_PERIOD = 20000,
  localparam int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW         = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_en,
  input  logic              test_req,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic [CW-1:0]     count,
  output logic              test_ctrl,
  output logic              test_done,
  output logic              fault,
  output logic [AW-1:0]     fault_addr,
  output logic [15:0]       test_count
);

  logic              start;
  logic              wen_int, ren_int;
  logic [AW-1:0]     waddr_int, raddr_int;
  logic              wen_tst, ren_tst;
  logic [AW-1:0]     addr_tst;
  logic [DATA_W-1:0] wdata_tst;
  logic              wen, ren;
  logic [AW-1:0]     waddr, raddr;
  logic [DATA_W-1:0] wdata, rdata;

  test_scheduler #(.TEST_PERIOD(TEST_PERIOD)) u_sched (
    .clk, .rst_n, .test_en, .test_req, .start
  );

  fifo_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .test_ctrl,
    .in_valid, .in_ready, .out_valid, .out_ready,
    .wen_int, .ren_int, .waddr(waddr_int), .raddr(raddr_int), .count
  );

  soa_mats_ctrl #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_test (
    .clk, .rst_n, .start, .test_ctrl, .done(test_done),
    .fault, .fault_addr, .sessions(test_count),
    .wen(wen_tst), .ren(ren_tst), .addr(addr_tst), .wdata(wdata_tst), .rdata
  );

  test_mux #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_mux (
    .test_ctrl,
    .wen_int, .ren_int, .waddr_int, .raddr_int, .wdata_int(in_data),
    .wen_tst, .ren_tst, .addr_tst, .wdata_tst,
    .wen, .ren, .waddr, .raddr, .wdata
  );

  fifo_mem #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_mem (
    .clk, .wen, .waddr, .wdata, .ren, .raddr, .rdata
  );

  assign out_data = ren_int ? rdata : '0;

endmodule
