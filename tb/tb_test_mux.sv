// tb_test_mux: self-checking test of the normal/test multiplexers.
//
// Applies random values to both input sets and checks that every memory
// signal follows the normal FIFO logic with test_ctrl low and the test
// circuit (one address for both ports) with test_ctrl high.
module tb_test_mux;
  localparam int DATA_W = 4;
  localparam int DEPTH  = 6;
  localparam int AW     = $clog2(DEPTH);

  logic              test_ctrl, wen_int, ren_int, wen_tst, ren_tst;
  logic [AW-1:0]     waddr_int, raddr_int, addr_tst, waddr, raddr;
  logic [DATA_W-1:0] wdata_int, wdata_tst, wdata;
  logic              wen, ren;
  int checks = 0, failures = 0;

  test_mux #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      test_ctrl = 1'(n % 2);
      {wen_int, ren_int, wen_tst, ren_tst} = 4'($urandom);
      waddr_int = AW'($urandom); raddr_int = AW'($urandom); addr_tst = AW'($urandom);
      wdata_int = DATA_W'($urandom); wdata_tst = DATA_W'($urandom);
      #1;
      check(int'(wen),   test_ctrl ? int'(wen_tst)   : int'(wen_int),   "wen (mu6)");
      check(int'(ren),   test_ctrl ? int'(ren_tst)   : int'(ren_int),   "ren (mu7)");
      check(int'(waddr), test_ctrl ? int'(addr_tst)  : int'(waddr_int), "waddr");
      check(int'(raddr), test_ctrl ? int'(addr_tst)  : int'(raddr_int), "raddr");
      check(int'(wdata), test_ctrl ? int'(wdata_tst) : int'(wdata_int), "wdata");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
