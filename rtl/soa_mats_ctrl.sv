// soa_mats_ctrl: test circuit running the transparent SOA-MATS++ march on a FIFO memory.
//
// The non-transparent SOA-MATS++ march is  {(w a); up(r a, w b); down(r b, w a); (r a)},
// with a the data pattern and b its complement. In the transparent form run
// here the word's own contents play the part of a, so no pattern is written
// first and every word holds its original value again when the test ends;
// flits waiting in the buffer survive the test.
//   ascending element, address 0 .. DEPTH-1, two cycles per word:
//     UP_R  read the word into temp
//     UP_W  write ~temp back (the word should now hold b)
//   descending element, address DEPTH-1 .. 0, three cycles per word:
//     DN_R  read the word into temp (should be b)
//     DN_W  write ~temp back (restores a)
//     DN_V  read again and compare with ~temp (the final "r a")
// A stuck-at bit cannot take both values written to it in the two elements,
// a transition fault blocks one of the two writes, and a read that returns a
// flipped bit upsets one of the reads, so each makes the DN_V compare fail.
// Folding the final read element into the descending element, one word at a
// time, is this design's own choice: it lets the compare use the value just
// read, needs no signature register, and names the failing word.
// Timing: start is taken in IDLE; test_ctrl is high for exactly 5*DEPTH
// cycles, then done pulses for one cycle. fault is sticky until reset and
// fault_addr keeps the first failing word. sessions counts finished tests.
// Reads use the memory's combinational read port: ren and addr are driven in
// a cycle and rdata is sampled at the end of that cycle.
module soa_mats_ctrl
  import fifo_test_pkg::*;
#(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned DEPTH  = 6,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              test_ctrl,
  output logic              done,
  output logic              fault,
  output logic [AW-1:0]     fault_addr,
  output logic [15:0]       sessions,
  // memory side (through the test multiplexers)
  output logic              wen,
  output logic              ren,
  output logic [AW-1:0]     addr,
  output logic [DATA_W-1:0] wdata,
  input  logic [DATA_W-1:0] rdata
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  mats_state_e       state;
  logic [AW-1:0]     a;
  logic [DATA_W-1:0] temp;
  logic              mismatch;

  assign test_ctrl = (state != T_IDLE) && (state != T_DONE);
  assign done      = (state == T_DONE);
  assign addr      = a;
  assign ren       = (state == T_UP_R) || (state == T_DN_R) || (state == T_DN_V);
  assign wen       = (state == T_UP_W) || (state == T_DN_W);
  assign wdata     = ~temp;
  assign mismatch  = (state == T_DN_V) && (rdata != ~temp);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      a          <= '0;
      temp       <= '0;
      fault      <= 1'b0;
      fault_addr <= '0;
      sessions   <= '0;
    end else begin
      case (state)
        T_IDLE: if (start) begin
          a     <= '0;
          state <= T_UP_R;
        end
        T_UP_R: begin
          temp  <= rdata;
          state <= T_UP_W;
        end
        T_UP_W: begin
          if (a == LAST) state <= T_DN_R;
          else begin
            a     <= a + 1'b1;
            state <= T_UP_R;
          end
        end
        T_DN_R: begin
          temp  <= rdata;
          state <= T_DN_W;
        end
        T_DN_W: state <= T_DN_V;
        T_DN_V: begin
          if (mismatch && !fault) begin
            fault      <= 1'b1;
            fault_addr <= a;
          end
          if (a == '0) state <= T_DONE;
          else begin
            a     <= a - 1'b1;
            state <= T_DN_R;
          end
        end
        T_DONE: begin
          sessions <= sessions + 1'b1;
          state    <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n) test_ctrl |-> (int'(a) < DEPTH));
  a_rw_excl:    assert property (@(posedge clk) disable iff (!rst_n) !(wen && ren));

endmodule
