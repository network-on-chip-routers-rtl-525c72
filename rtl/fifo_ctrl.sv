// fifo_ctrl: pointer and flow control of one FIFO buffer in normal operation.
//
// Keeps the write pointer, the read pointer and the number of stored flits,
// and produces the internal enables wen_int and ren_int that, while test_ctrl
// is low, drive the memory. A flit is written when the upstream side offers
// one (in_valid) and the buffer has room; the head flit is read and removed
// when the neighbouring switch asks for it (out_ready) and the buffer is not
// empty. Both can happen in the same cycle. Pointers wrap at DEPTH, which
// need not be a power of two.
// While test_ctrl is high the test circuit owns the memory: in_ready and
// out_valid are held low, so no flit moves and the pointers and count stay
// frozen until the test ends. The valid/ready handshake and the freezing of
// traffic during the test are this design's choices; the document names only
// the enables wen_int/ren_int, the data-in and data-out lines and test_ctrl.
// A transfer takes effect at the rising edge of the cycle in which both valid
// and ready are high.
module fifo_ctrl #(
  parameter int unsigned DEPTH = 6,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_ctrl,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          wen_int,
  output logic          ren_int,
  output logic [AW-1:0] waddr,
  output logic [AW-1:0] raddr,
  output logic [CW-1:0] count
);

  logic [AW-1:0] wptr, rptr;
  logic [CW-1:0] cnt;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign in_ready  = !test_ctrl && (int'(cnt) < DEPTH);
  assign out_valid = !test_ctrl && (cnt != '0);
  assign wen_int   = in_valid && in_ready;
  assign ren_int   = out_ready && out_valid;
  assign waddr     = wptr;
  assign raddr     = rptr;
  assign count     = cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (wen_int) wptr <= next_ptr(wptr);
      if (ren_int) rptr <= next_ptr(rptr);
      case ({wen_int, ren_int})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  // No flit moves while the test circuit owns the memory.
  a_no_wr_in_test: assert property (@(posedge clk) disable iff (!rst_n) test_ctrl |-> !wen_int);
  a_no_rd_in_test: assert property (@(posedge clk) disable iff (!rst_n) test_ctrl |-> !ren_int);
  a_cnt_range:     assert property (@(posedge clk) disable iff (!rst_n) int'(cnt) <= DEPTH);

endmodule
