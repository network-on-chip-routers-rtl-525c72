// tb_fifo_ctrl: self-checking test of the FIFO pointer and flow control.
//
// Drives random in_valid/out_ready and test_ctrl against a reference model
// of occupancy and pointers (wrapping at DEPTH = 6), and checks in_ready,
// out_valid, the internal enables, both addresses and the count each cycle.
// Counts that the full, empty, simultaneous read/write and test-freeze cases
// all occurred.
module tb_fifo_ctrl;
  localparam int DEPTH = 6;
  localparam int AW    = $clog2(DEPTH);
  localparam int CW    = $clog2(DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic test_ctrl = 1'b0, in_valid = 1'b0, out_ready = 1'b0;
  logic in_ready, out_valid, wen_int, ren_int;
  logic [AW-1:0] waddr, raddr;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  int m_cnt = 0, m_w = 0, m_r = 0;
  int n_full = 0, n_empty = 0, n_both = 0, n_frozen = 0;

  fifo_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_w, exp_r;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // phases: mostly fill, mostly drain, mixed
      in_valid  = ($urandom_range(99) < ((n / 200) % 3 == 0 ? 85 : (n / 200) % 3 == 1 ? 15 : 50));
      out_ready = ($urandom_range(99) < ((n / 200) % 3 == 0 ? 15 : (n / 200) % 3 == 1 ? 85 : 50));
      test_ctrl = ($urandom_range(99) < 8);
      #1;
      check(int'(in_ready),  int'(!test_ctrl && m_cnt < DEPTH), "in_ready");
      check(int'(out_valid), int'(!test_ctrl && m_cnt > 0), "out_valid");
      exp_w = in_valid && !test_ctrl && m_cnt < DEPTH;
      exp_r = out_ready && !test_ctrl && m_cnt > 0;
      check(int'(wen_int), int'(exp_w), "wen_int");
      check(int'(ren_int), int'(exp_r), "ren_int");
      check(int'(waddr), m_w, "waddr");
      check(int'(raddr), m_r, "raddr");
      check(int'(count), m_cnt, "count");
      if (m_cnt == DEPTH) n_full++;
      if (m_cnt == 0) n_empty++;
      if (exp_w && exp_r) n_both++;
      if (test_ctrl && (in_valid || out_ready) && m_cnt > 0 && m_cnt < DEPTH) n_frozen++;
      if (exp_w) m_w = (m_w + 1) % DEPTH;
      if (exp_r) m_r = (m_r + 1) % DEPTH;
      m_cnt += int'(exp_w) - int'(exp_r);
    end
    checks++;
    if (n_full == 0 || n_empty == 0 || n_both == 0 || n_frozen == 0) begin
      failures++;
      $display("FAIL coverage full=%0d empty=%0d both=%0d frozen=%0d", n_full, n_empty, n_both, n_frozen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
