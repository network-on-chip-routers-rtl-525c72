// test_scheduler: starts an online test of the buffer at a fixed period.
//
// A cycle counter runs while test_en is high and pulses start for one cycle
// every TEST_PERIOD cycles; test_req starts a test at once as well. Holding
// test_en low stops and clears the counter. The default period of 20 000
// cycles is the longer of the two test periods the document evaluates (the
// other is 5 000); the document states the period in milliseconds of its
// cycle-level simulator, read here as clock cycles. The counter and the
// extra request input are this design's choices.
module test_scheduler #(
  parameter int unsigned TEST_PERIOD = 20000,
  localparam int unsigned PW         = (TEST_PERIOD > 1) ? $clog2(TEST_PERIOD) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test_en,
  input  logic test_req,
  output logic start
);

  logic [PW-1:0] cnt;
  logic          tick;

  assign tick  = test_en && (int'(cnt) == TEST_PERIOD - 1);
  assign start = tick || test_req;

  always_ff @(posedge clk) begin
    if (!rst_n || !test_en || tick) cnt <= '0;
    else                            cnt <= cnt + 1'b1;
  end

endmodule
