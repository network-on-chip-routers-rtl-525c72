# Online-testable FIFO buffer for NoC routers

Routers in a network on chip spend most of their area on input FIFO buffers,
so that is where permanent faults are most likely to appear once a chip is in
the field. Such faults often start as intermittent errors and harden over time.
They must therefore be found while the chip runs, and a test run now and then
must not destroy the flits waiting in the buffer.

This RTL is one router data channel's input buffer with an online memory test
built in. A small test circuit periodically takes the buffer's memory for a few
cycles and runs a *transparent* march test on every word. The march is a
transparent form of SOA-MATS++. It finds stuck-at, transition and read-disturb
faults, and afterwards every word holds its old value again. Traffic pauses
during the test and then carries on with the same flits in the same order.

## The transparent SOA-MATS++ march

A march test visits every memory word in a fixed address order and applies
the same short sequence of reads and writes to each one. The standard
(non-transparent) SOA-MATS++ is

    { (w a) ; up(r a, w b) ; down(r b, w a) ; (r a) }

Here `a` is a data pattern and `b = ~a` its complement. `up` and `down` mean
ascending and descending addresses. Before the march starts, the first element
writes `a` into every word, so this form destroys the buffer's contents.

The transparent form uses each word's current value as its own `a`. No pattern
is written first, and both complement writes cancel out. The test circuit
(`soa_mats_ctrl`) has one register, `temp`, and runs these steps:

| element    | address order  | cycle  | action                                      |
|------------|----------------|--------|---------------------------------------------|
| ascending  | 0 .. DEPTH-1   | `UP_R` | read word → `temp` (should be `a`)          |
|            |                | `UP_W` | write `~temp` (word should now be `b`)      |
| descending | DEPTH-1 .. 0   | `DN_R` | read word → `temp` (should be `b`)          |
|            |                | `DN_W` | write `~temp` (restores `a`)                |
|            |                | `DN_V` | read word, compare with `~temp`; mismatch → fault |

The last element of the march, the final `(r a)`, needs an expected value. This
design reads that expected value off the descending element. `DN_V` runs
straight after the restoring write, and the correct answer is the complement of
the value `DN_R` just read. Doing it word by word means no signature register is
needed. It also means the circuit knows which word failed.

How each fault shows up:

* **Stuck-at bit.** The bit gets written with both values, once in each
  element, and it can hold only one of them. Example: the word holds `1010` and
  its MSB is stuck at 1. The ascending write of `0101` stores `1101`. The
  descending read gets `1101` and writes `0010`, which is stored as `1010`.
  `DN_V` expects `0010` and reads `1010`: fault.
* **Transition fault.** A cell that cannot rise, or cannot fall, misses one of
  the two complement writes. The verify read then differs.
* **Read-disturb fault.** Here the read returns the flipped bit and leaves the
  cell flipped. This corrupts `temp`, so the restoring write and the verify read
  disagree. A *deceptive* read disturb is not guaranteed to be caught. In that
  kind, the read returns the right value and only the cell flips.

If a word is faulty it keeps whatever the fault leaves in it. Good words are
always restored.

**Session timing.** A session takes 2 cycles per word going up and 3 per word
going down. That is 5·DEPTH cycles, 30 for the default depth of 6. `test_ctrl`
is high for exactly those cycles. `test_done` then pulses for one cycle.

## Buffer architecture

```
             in_valid/in_ready/in_data                 out_valid/out_ready/out_data
                      |                                          ^
                 +----v-------------+   wen_int, ren_int,  +-----+-----+
                 |  fifo_ctrl       |---- pointers ------->|           |
                 |  (pointers,count)|                      | test_mux  |--> fifo_mem
                 +------------------+   wen, ren, addr,    | (mu6,mu7, |    DEPTH x DATA_W
  test_en ->+----------------+ start+--- wdata ----------->| addr/data)|<-- rdata
  test_req->| test_scheduler |----->| soa_mats_ctrl   |<---+-----------+
            +----------------+      | (march FSM,temp)|---- test_ctrl (select)
                                    +-----------------+---- fault, fault_addr
```

* **`fifo_mem`**: the word storage, DEPTH × DATA_W. A write happens at the
  clock edge. The read is combinational and gated by the read enable, so
  `rdata` is zero when `ren` is low. It is written as a register array and
  stands for the SRAM of a real router.
* **`fifo_ctrl`**: the circular write and read pointers (which wrap at DEPTH,
  not necessarily a power of two) and the occupancy count. It produces the
  internal enables `wen_int` and `ren_int`. While `test_ctrl` is high it holds
  `in_ready` and `out_valid` low, so no flit moves and the pointers stay where
  they are.
* **`test_mux`**: when `test_ctrl` is high, it hands the memory's write enable
  (multiplexer *mu6*), read enable (*mu7*), addresses and write data to the
  test circuit. When `test_ctrl` is low, the FIFO logic drives them.
* **`soa_mats_ctrl`**: the march state machine described above.
* **`test_scheduler`**: a cycle counter that starts a session every
  TEST_PERIOD cycles while `test_en` is high. `test_req` starts one at once.
  While a session runs, further starts are ignored.
* **`testable_fifo`**: the top level, which wires these blocks together.

## Interface of `testable_fifo`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (pointers, count, FSM, counters; not the memory array) |
| `test_en` | in | 1 | enable periodic testing |
| `test_req` | in | 1 | start a test now |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/DATA_W | upstream flit port |
| `out_valid`, `out_ready`, `out_data` | out/in/out | 1/1/DATA_W | downstream flit port |
| `count` | out | $clog2(DEPTH+1) | stored flits |
| `test_ctrl` | out | 1 | the test owns the memory (both flit ports closed) |
| `test_done` | out | 1 | one-cycle pulse at the end of a session |
| `fault`, `fault_addr` | out | 1 / $clog2(DEPTH) | sticky fault flag and the first failing word |
| `test_count` | out | 16 | completed sessions |

A flit moves at a rising edge when valid and ready are both high. `out_data`
is only defined in such a cycle, because it comes from the read-enable-gated
memory port. It reads as zero otherwise. A write and a read can happen in the
same cycle. A full buffer does not take a new flit even when a flit leaves in
the same cycle.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `DATA_W` | 4 | word size of the method's worked example; a real router would use its flit width |
| `DEPTH` | 6 | buffer depth used in the method's throughput study |
| `TEST_PERIOD` | 20000 | the longer of the two test periods studied (the other is 5000), in clock cycles |

## Cost of testing

The buffer is closed for 5·DEPTH cycles in every TEST_PERIOD: 0.15 % of cycles
at a period of 20 000 and 0.6 % at 5 000. `tb_test_period_workload` runs three
copies of the buffer side by side on the same bursty traffic for 200 000
cycles. One copy is never tested, one is tested every 20 000 cycles and one
every 5 000. The traffic has ON/OFF periods with Pareto-distributed lengths,
a common stand-in for self-similar traffic. Measured for one buffer:

| test period | sessions | blocked cycles | throughput (flits/cycle) | mean latency change |
|-------------|----------|----------------|--------------------------|---------------------|
| none        | 0        | 0              | 0.4415                   | —                   |
| 20 000      | 10       | 300            | 0.4415                   | +2.7 %              |
| 5 000       | 40       | 1 200          | 0.4415                   | +9.2 %              |

At this load the buffer still delivers every flit offered to it. The test
therefore shows up as extra latency, not as lost throughput. The exact latency
figures depend on the random seed. The published study of this technique
modelled a whole 4 × 8 mesh. It reported a network throughput of 0.281
without testing and 0.280 with a test every 20 000 cycles. With a test every
5 000 cycles, throughput fell by 5.3 % and latency rose by 4.8 %. A single
buffer cannot reproduce network-level figures like these, and the mesh is not
part of this RTL.

Yosys coarse synthesis puts the area of the default configuration at 92
word-level cells, 54 flip-flop bits and 24 memory bits. Of these, the storage
and its control (`fifo_mem`, `fifo_ctrl`) take 33 cells, 9 flip-flops and the
24 memory bits. The test logic takes the rest. The march controller has 44
cells and 30 flip-flops, 16 of which are the session counter. The scheduler has
9 cells and 15 flip-flops, and the multiplexers have 5 cells. A 6 × 4-bit buffer
is tiny, so the test logic outweighs it here. The controller grows only with
log2(DEPTH) and DATA_W (for `temp`), while the storage grows with
DEPTH × DATA_W, so with realistic flit widths and depths the test logic becomes
a small fraction of the buffer.

## Design choices beyond the method

The method fixes the architecture: a FIFO memory with internal enables
`wen_int`/`ren_int`, the mu6/mu7 enable multiplexers selected by `test_ctrl`,
a test circuit with a `temp` register, and the SOA-MATS++ march in transparent
form. The following choices are this design's own:

* **Final read element folded in.** The final read element runs word by word
  inside the descending element (see above). The method's worked example also
  keeps a second copy of the word, `orig`. This compare scheme never needs it,
  so it is left out.
* **Traffic during a test.** Traffic stalls: both handshakes close. The
  stored flits are preserved by the transparent march, not by keeping a copy.
* **One clock.** The method clocks the test-mode enables from a separate test
  clock, but gives no relation between the two clocks. Here the router clock
  drives everything. Running the test on another clock would need a clock
  multiplexer in front of the memory and synchronisers on `start` and
  `test_ctrl`.
* **Other muxing.** Addresses and write data are multiplexed in the same way as
  the enables. One test address drives both memory ports.
* **Additions.** The valid/ready handshake, the reset, the scheduler's
  `test_req`, the fault outputs and the session counter are all additions.
* **Period units.** The test period is counted in clock cycles. The study gave
  it in units of its cycle-level simulator.

## Not included

* **The router itself.** Routing logic, arbitration, crossbar and flit format
  are not part of this RTL. A router would instantiate one `testable_fifo` per
  input channel. It would connect the flit ports, and it could OR the `fault`
  flags into a status register.
* **Online test of the routing logic.** This test carries test patterns in
  unused fields of header flits. Its header format and patterns are not
  specified, so it is not implemented.
* **The 4 × 8 mesh and its traffic generators.**

## Simulation

All files are SystemVerilog-2017. `rtl/fifo_test_pkg.sv` must be read before the
modules that import it. Each testbench prints `TB_RESULT checks=N failures=M`
and ends. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fifo_test_pkg.sv \
          tb/tb_testable_fifo.sv --top-module tb_testable_fifo -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_fifo_mem` | reads match a reference copy; the gated read returns zero |
| `tb_fifo_ctrl` | pointers, count, full/empty, enables and the freeze during tests match a reference model |
| `tb_test_mux` | every memory signal follows the selected source |
| `tb_test_scheduler` | exact period, disable/restart, immediate request |
| `tb_soa_mats_ctrl` | a memory model with injected stuck-at-0/1, rising/falling transition and read-disturb faults: each is detected and located; good memories are restored; 5·DEPTH-cycle sessions; the 1010 / MSB-stuck-at-1 example |
| `tb_testable_fifo` | default size, 45 000 cycles of random traffic with periodic and requested tests; every flit is checked for order and value; a stuck-at fault forced into a memory cell is found and located; each mechanism (periodic test, requested test, test with flits stored, upstream stall, downstream hold, full, empty, simultaneous read and write, fault detection) is counted and must occur |
| `tb_test_period_workload` | the throughput and latency comparison above |

To change the size, override `DATA_W`, `DEPTH` and `TEST_PERIOD` on
`testable_fifo`. DEPTH does not need to be a power of two. TEST_PERIOD sets the
width of the scheduler's counter.
