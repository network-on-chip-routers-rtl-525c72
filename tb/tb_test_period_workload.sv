// tb_test_period_workload: throughput and latency of one buffer with and
// without periodic online testing.
//
// Three copies of the buffer (4-bit flits, 6 words) see the same traffic for
// 200 000 cycles: one with testing disabled, one tested every 20 000 cycles
// and one every 5 000 cycles, the two periods and the run length of the
// throughput study this design comes from. Arrivals are bursty: ON and OFF
// periods with Pareto-distributed lengths (shape 1.5), the usual way to make
// self-similar traffic; during ON a flit arrives each cycle with probability
// 0.9. Each copy has its own unbounded source queue, and the downstream side
// requests a flit with probability 0.5 per cycle (the same draw for all
// copies). Checked: every flit arrives in order and unchanged; the number of
// sessions is run length / period; the buffer is blocked for 5*DEPTH cycles
// per session; testing never raises throughput, and lowers it by no more
// than the blocked fraction plus 0.2 %. Throughput (flits per cycle) and mean
// latency (cycles from arrival to delivery) are printed for each copy.
module tb_test_period_workload;
  localparam int DATA_W = 4;
  localparam int DEPTH  = 6;
  localparam int CYCLES = 200000;
  localparam int NI     = 3;
  localparam int PER [NI] = '{20000, 20000, 5000};
  localparam bit TEN [NI] = '{1'b0, 1'b1, 1'b1};

  logic clk = 1'b0, rst_n = 1'b0;
  logic              in_valid [NI], in_ready [NI], out_valid [NI], out_ready;
  logic [DATA_W-1:0] in_data [NI], out_data [NI];
  logic              test_ctrl [NI], fault [NI];
  logic [15:0]       test_count [NI];
  logic              test_en [NI];

  for (genvar g = 0; g < NI; g++) begin : g_dut
    logic              test_done;
    logic [$clog2(DEPTH+1)-1:0] count;
    logic [$clog2(DEPTH)-1:0]   fault_addr;
    testable_fifo #(.DATA_W(DATA_W), .DEPTH(DEPTH), .TEST_PERIOD(PER[g])) dut (
      .clk, .rst_n, .test_en(test_en[g]), .test_req(1'b0),
      .in_valid(in_valid[g]), .in_ready(in_ready[g]), .in_data(in_data[g]),
      .out_valid(out_valid[g]), .out_ready, .out_data(out_data[g]),
      .count, .test_ctrl(test_ctrl[g]), .test_done, .fault(fault[g]),
      .fault_addr, .test_count(test_count[g])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  typedef struct { logic [DATA_W-1:0] d; int t; } flit_t;
  flit_t src [NI][$];
  flit_t inbuf [NI][$];
  longint delivered [NI], lat_sum [NI];
  int blocked [NI];
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int pareto(input real xm);
    real u;
    u = real'($urandom_range(1, 1000000)) / 1.0e6;
    return int'(xm * (u ** (-1.0 / 1.5))) > 2000 ? 2000 : int'(xm * (u ** (-1.0 / 1.5)));
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles in which each copy is closed to traffic by a test
  always @(negedge clk)
    if (rst_n) for (int i = 0; i < NI; i++) if (test_ctrl[i]) blocked[i]++;

  // drive the heads of the source queues
  always_comb
    for (int i = 0; i < NI; i++) begin
      in_valid[i] = (src[i].size() != 0);
      in_data[i]  = (src[i].size() != 0) ? src[i][0].d : '0;
    end

  initial begin
    static bit on = 1'b0;
    static int left = 0;
    logic [DATA_W-1:0] d;
    for (int i = 0; i < NI; i++) begin
      delivered[i] = 0; lat_sum[i] = 0; blocked[i] = 0; test_en[i] = 1'b0;
    end
    out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NI; i++) test_en[i] = TEN[i];
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      bit take [NI];
      @(negedge clk);
      // new arrivals (identical for every copy) and the downstream request
      if (left == 0) begin
        on   = !on;
        left = pareto(4.0);
      end
      left--;
      if (on && $urandom_range(99) < 90) begin
        d = DATA_W'($urandom);
        for (int i = 0; i < NI; i++) src[i].push_back('{d, cyc});
      end
      out_ready = ($urandom_range(99) < 50);
      #1;
      // transfers that the next rising edge performs
      for (int i = 0; i < NI; i++) begin
        if (out_valid[i] && out_ready) begin
          flit_t f;
          int    dt;
          f = inbuf[i].pop_front();
          dt = cyc - f.t;
          check(out_data[i] == f.d, "flit data/order");
          delivered[i]++;
          lat_sum[i] = lat_sum[i] + longint'(dt);
        end
        take[i] = in_valid[i] && in_ready[i];
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < NI; i++) if (take[i]) inbuf[i].push_back(src[i].pop_front());
    end
    // let a session that started near the end finish (no new arrivals)
    out_ready = 1'b0;
    repeat (5 * DEPTH + 5) @(negedge clk);
    for (int i = 0; i < NI; i++) begin
      real thr, lat, drop, bfrac;
      thr = real'(delivered[i]) / CYCLES;
      lat = (delivered[i] != 0) ? real'(lat_sum[i]) / real'(delivered[i]) : 0.0;
      $display("copy %0d: test %s period %0d: sessions=%0d blocked=%0d throughput=%f latency=%f",
               i, TEN[i] ? "on " : "off", PER[i], test_count[i], blocked[i], thr, lat);
      check(fault[i] == 1'b0, "no fault on a good memory");
      if (TEN[i]) begin
        check(int'(test_count[i]) == CYCLES / PER[i], "sessions = run length / period");
        check(blocked[i] == 5 * DEPTH * int'(test_count[i]), "5*DEPTH blocked cycles per session");
        drop  = real'(delivered[0] - delivered[i]) / real'(delivered[0]);
        bfrac = real'(blocked[i]) / CYCLES;
        $display("        throughput drop %f %% (blocked fraction %f %%), latency increase %f %%",
                 100.0 * drop, 100.0 * bfrac,
                 100.0 * (lat - real'(lat_sum[0]) / real'(delivered[0])) / (real'(lat_sum[0]) / real'(delivered[0])));
        check(delivered[i] <= delivered[0], "testing does not raise throughput");
        check(drop <= bfrac + 0.002, "drop bounded by blocked fraction");
      end else begin
        check(test_count[i] == 0 && blocked[i] == 0, "no sessions with testing off");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
