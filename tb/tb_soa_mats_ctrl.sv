// tb_soa_mats_ctrl: self-checking test of the transparent SOA-MATS++ test circuit.
//
// The test circuit drives a memory model kept in this testbench, into which
// one permanent fault can be injected: stuck-at-0, stuck-at-1, a transition
// fault that blocks 0->1 or 1->0, or a read-disturb fault (the read returns
// the flipped bit and leaves the cell flipped). Checks:
//  - fault-free sessions: no fault reported, every word restored, test_ctrl
//    high for exactly 5*DEPTH cycles, one done pulse, session counter;
//  - the worked example: word 1010 with its MSB stuck at 1 holds 1101 after
//    the ascending write of the complement;
//  - each fault type at a random word and bit: fault raised, fault_addr right;
//  - a start while a session runs is ignored.
module tb_soa_mats_ctrl;
  import fifo_test_pkg::*;
  localparam int DATA_W = 4;
  localparam int DEPTH  = 6;
  localparam int AW     = $clog2(DEPTH);

  typedef enum int {F_NONE, F_SA0, F_SA1, F_TF_UP, F_TF_DN, F_RDF} fault_e;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic              test_ctrl, done, fault, wen, ren;
  logic [AW-1:0]     fault_addr, addr;
  logic [15:0]       sessions;
  logic [DATA_W-1:0] wdata, rdata;
  logic [DATA_W-1:0] mem [DEPTH];
  fault_e            ftype = F_NONE;
  int                faddr = 0, fbit = 0;
  int checks = 0, failures = 0;

  soa_mats_ctrl #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // memory model with one injectable fault
  always_comb begin
    rdata = '0;
    if (ren) begin
      rdata = mem[addr];
      if (ftype == F_RDF && int'(addr) == faddr) rdata[fbit] = ~rdata[fbit];
    end
  end

  always @(posedge clk) begin
    logic [DATA_W-1:0] nv;
    if (wen) begin
      nv = wdata;
      if (int'(addr) == faddr) begin
        case (ftype)
          F_SA0:   nv[fbit] = 1'b0;
          F_SA1:   nv[fbit] = 1'b1;
          F_TF_UP: if (!mem[addr][fbit]) nv[fbit] = 1'b0;
          F_TF_DN: if (mem[addr][fbit])  nv[fbit] = 1'b1;
          default: ;
        endcase
      end
      mem[addr] <= nv;
    end else if (ren && ftype == F_RDF && int'(addr) == faddr) begin
      mem[addr][fbit] <= ~mem[addr][fbit];
    end
  end

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // runs one session; returns the number of cycles test_ctrl was high
  task automatic run_session(output int busy, output int dones);
    busy = 0; dones = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done && busy < 10 * DEPTH) begin
      if (test_ctrl) busy++;
      // a second start while busy must be ignored
      start = (busy == 3);
      @(negedge clk);
    end
    start = 1'b0;
    while (done) begin dones++; @(negedge clk); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] saved [DEPTH];
    int busy, dones, nsess;
    for (int i = 0; i < DEPTH; i++) mem[i] = DATA_W'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(int'(test_ctrl), 0, "idle after reset");
    nsess = 0;

    // fault-free sessions: transparent, no fault, exact duration
    for (int s = 0; s < 20; s++) begin
      for (int i = 0; i < DEPTH; i++) begin mem[i] = DATA_W'($urandom); saved[i] = mem[i]; end
      run_session(busy, dones);
      nsess++;
      check(busy, 5 * DEPTH, "session length");
      check(dones, 1, "done pulse");
      check(int'(fault), 0, "no fault on good memory");
      for (int i = 0; i < DEPTH; i++) check(int'(mem[i]), int'(saved[i]), "contents restored");
    end
    @(negedge clk);
    check(int'(sessions), nsess, "session counter");

    // worked example: 1010 with stuck-at-1 on the MSB stores 1101 after the
    // ascending write of the complement
    ftype = F_SA1; faddr = 0; fbit = DATA_W - 1;
    mem[0] = 4'b1010;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;           // state UP_R at address 0
    @(negedge clk);                        // UP_W
    @(negedge clk);
    check(int'(mem[0]), int'(4'b1101), "worked example: stored word");
    while (!done) @(negedge clk);
    @(negedge clk);
    check(int'(fault), 1, "worked example: detected");
    check(int'(fault_addr), 0, "worked example: address");

    // each fault type, random word, bit and contents
    for (int t = 0; t < 60; t++) begin
      rst_n = 1'b0;
      ftype = F_NONE;
      @(negedge clk);
      rst_n = 1'b1;
      ftype = fault_e'(1 + t % 5);
      faddr = $urandom_range(DEPTH - 1);
      fbit  = $urandom_range(DATA_W - 1);
      for (int i = 0; i < DEPTH; i++) mem[i] = DATA_W'($urandom);
      if (ftype == F_SA0) mem[faddr][fbit] = 1'b0;
      if (ftype == F_SA1) mem[faddr][fbit] = 1'b1;
      run_session(busy, dones);
      check(busy, 5 * DEPTH, "faulty session length");
      check(int'(fault), 1, $sformatf("fault type %0d detected", int'(ftype)));
      check(int'(fault_addr), faddr, "fault address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
