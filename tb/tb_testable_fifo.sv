// tb_testable_fifo: end-to-end test of the testable router buffer at its
// default size (4-bit flits, 6 words, a test every 20 000 cycles).
//
// Phase 1 (fault-free, about 45 000 cycles): random upstream offers and
// downstream requests with changing load, online tests started by the
// periodic scheduler and by test_req, often while flits are stored. A
// reference queue checks that every flit leaves once, in order and unchanged,
// so each test must leave the buffer exactly as it found it. Each cycle the
// testbench also checks that no flit moves while test_ctrl is high and that
// each session keeps test_ctrl high for 5*DEPTH cycles, and it checks the
// cycle distance between periodic sessions.
// Phase 2: a stuck-at fault is forced onto one bit of one memory word; the
// next test must raise fault and name the word.
// Counted mechanisms, each of which must occur: periodic test, requested
// test, test with flits stored, upstream stalled by a test, downstream held
// by a test, buffer full, buffer empty, simultaneous write and read, fault
// detected.
module tb_testable_fifo;
  localparam int DATA_W = 4;
  localparam int DEPTH  = 6;
  localparam int PERIOD = 20000;
  localparam int AW     = $clog2(DEPTH);
  localparam int CW     = $clog2(DEPTH + 1);

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              test_en = 1'b0, test_req = 1'b0;
  logic              in_valid = 1'b0, out_ready = 1'b0;
  logic              in_ready, out_valid, test_ctrl, test_done, fault;
  logic [DATA_W-1:0] in_data = '0, out_data;
  logic [CW-1:0]     count;
  logic [AW-1:0]     fault_addr;
  logic [15:0]       test_count;

  testable_fifo dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_periodic = 0, n_requested = 0, n_test_with_data = 0, n_in_stall = 0;
  int n_out_hold = 0, n_full = 0, n_empty = 0, n_both = 0, n_fault = 0;
  logic [DATA_W-1:0] q [$];
  bit   inject = 1'b0;
  int   fa = 0, fb = 0;
  logic fv = 1'b0;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // permanent stuck-at fault on one memory cell: the cell is forced back to
  // its stuck value after every clock edge
  always @(negedge clk) if (inject) dut.u_mem.mem[fa][fb] = fv;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: scoreboard, rules during the test, session length and spacing
  int busy_len = 0, cyc = 0, last_periodic_start = -1;
  bit scoreboard_on = 1'b1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (test_ctrl) begin
        checks++;
        if (in_ready || out_valid) begin
          failures++;
          $display("FAIL handshake open during test at %0t", $time);
        end
        if (in_valid) n_in_stall++;
        if (out_ready && count != 0) n_out_hold++;
        busy_len++;
      end else if (busy_len != 0) begin
        check(busy_len, 5 * DEPTH, "test session length");
        busy_len = 0;
      end
      if (int'(count) == DEPTH) n_full++;
      if (count == 0 && !test_ctrl) n_empty++;
      if (in_valid && in_ready && out_valid && out_ready) n_both++;
      if (out_valid && out_ready && scoreboard_on) begin
        if (q.size() == 0) begin
          failures++;
          $display("FAIL flit out of an empty reference queue");
        end else check(int'(out_data), int'(q.pop_front()), "flit data/order");
      end
      if (in_valid && in_ready) q.push_back(in_data);
      // start of a session
      if (dut.start && !test_ctrl && dut.u_test.state == 0) begin
        if (count != 0) n_test_with_data++;
        if (test_req) n_requested++;
        else begin
          n_periodic++;
          if (last_periodic_start >= 0) check(cyc - last_periodic_start, PERIOD, "test period");
          last_periodic_start = cyc;
        end
      end
    end
  end

  initial begin
    int load;
    repeat (3) @(negedge clk);
    rst_n   = 1'b1;
    test_en = 1'b1;
    for (int n = 0; n < 45000; n++) begin
      @(negedge clk);
      load = (n / 500) % 4;   // 0 fill, 1 drain, 2 balanced, 3 light
      case (load)
        0: begin in_valid = ($urandom_range(99) < 80); out_ready = ($urandom_range(99) < 20); end
        1: begin in_valid = ($urandom_range(99) < 20); out_ready = ($urandom_range(99) < 80); end
        2: begin in_valid = ($urandom_range(99) < 60); out_ready = ($urandom_range(99) < 60); end
        default: begin in_valid = ($urandom_range(99) < 10); out_ready = 1'b1; end
      endcase
      in_data  = DATA_W'($urandom);
      // an extra requested test now and then, away from the periodic ones
      test_req = (n % 1000 == 357);
    end
    @(negedge clk);
    in_valid = 1'b0; test_req = 1'b0;
    out_ready = 1'b1;
    repeat (60) @(negedge clk);
    check(q.size(), 0, "all flits delivered");
    check(int'(fault), 0, "no fault on a good memory");
    check(int'(test_count), n_periodic + n_requested, "session counter");

    // phase 2: permanent fault in one word, then a requested test
    scoreboard_on = 1'b0;
    fa = $urandom_range(DEPTH - 1);
    fb = $urandom_range(DATA_W - 1);
    fv = 1'($urandom);
    inject = 1'b1;
    repeat (5) @(negedge clk);
    test_req = 1'b1;
    @(negedge clk) test_req = 1'b0;
    repeat (5 * DEPTH + 5) @(negedge clk);
    check(int'(fault), 1, "stuck-at fault detected");
    check(int'(fault_addr), fa, "faulty word located");
    if (fault) n_fault++;
    inject = 1'b0;

    $display("mechanisms: periodic=%0d requested=%0d with_data=%0d in_stall=%0d out_hold=%0d full=%0d empty=%0d both=%0d fault=%0d",
             n_periodic, n_requested, n_test_with_data, n_in_stall, n_out_hold, n_full, n_empty, n_both, n_fault);
    check(int'(n_periodic > 1), 1, "periodic tests occurred");
    check(int'(n_requested > 0), 1, "requested tests occurred");
    check(int'(n_test_with_data > 0), 1, "tests with stored flits occurred");
    check(int'(n_in_stall > 0), 1, "upstream stalled by a test");
    check(int'(n_out_hold > 0), 1, "downstream held by a test");
    check(int'(n_full > 0), 1, "buffer full occurred");
    check(int'(n_empty > 0), 1, "buffer empty occurred");
    check(int'(n_both > 0), 1, "simultaneous write and read occurred");
    check(int'(n_fault > 0), 1, "fault detection occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
