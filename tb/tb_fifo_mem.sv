// tb_fifo_mem: self-checking test of the FIFO word storage.
//
// Writes random words to random addresses and keeps a reference copy; checks
// every read against the copy and that the data-out line is zero while the
// read enable is low. Also checks that a write and a read of the same word in
// one cycle returns the old word (write takes effect at the clock edge).
module tb_fifo_mem;
  localparam int DATA_W = 4;
  localparam int DEPTH  = 6;
  localparam int AW     = $clog2(DEPTH);

  logic              clk = 1'b0;
  logic              wen = 1'b0, ren = 1'b0;
  logic [AW-1:0]     waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [DATA_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  fifo_mem #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [DATA_W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wen = 1'b1; waddr = AW'(i); wdata = DATA_W'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk) wen = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      wen   = 1'($urandom);
      waddr = AW'($urandom_range(DEPTH - 1));
      wdata = DATA_W'($urandom);
      ren   = 1'($urandom);
      raddr = AW'($urandom_range(DEPTH - 1));
      #1;
      if (ren) check(rdata, ref_mem[raddr], "read");
      else     check(rdata, '0, "gated read");
      @(posedge clk);
      if (wen) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
