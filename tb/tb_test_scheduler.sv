// tb_test_scheduler: self-checking test of the periodic test trigger.
//
// With a short period (override, 37 cycles) checks that start pulses exactly
// every period while test_en is high, never while it is low, restarts the
// count after test_en returns, and follows test_req at once.
module tb_test_scheduler;
  localparam int PERIOD = 37;

  logic clk = 1'b0, rst_n = 1'b0, test_en = 1'b0, test_req = 1'b0;
  logic start;
  int checks = 0, failures = 0;

  test_scheduler #(.TEST_PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
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
    int since;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // disabled: no pulses
    repeat (100) begin
      @(negedge clk);
      check(int'(start), 0, "idle start");
    end
    // enabled: a pulse in the PERIOD-th cycle after enabling, then every PERIOD
    test_en = 1'b1;
    since = 0;
    repeat (5 * PERIOD + 3) begin
      #1;
      since++;
      check(int'(start), int'(since == PERIOD), "periodic start");
      if (since == PERIOD) since = 0;
      @(negedge clk);
    end
    // disabling clears the count
    test_en = 1'b0;
    repeat (10) begin
      @(negedge clk);
      check(int'(start), 0, "disabled start");
    end
    test_en = 1'b1;
    repeat (PERIOD - 1) begin
      #1 check(int'(start), 0, "restart no pulse");
      @(negedge clk);
    end
    #1 check(int'(start), 1, "restart pulse");
    // immediate request
    @(negedge clk);
    test_en = 1'b0; test_req = 1'b1;
    #1 check(int'(start), 1, "test_req");
    @(negedge clk);
    test_req = 1'b0;
    #1 check(int'(start), 0, "test_req released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
