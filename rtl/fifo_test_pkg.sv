// fifo_test_pkg: types shared by the testable FIFO buffer.
//
// Holds the state encoding of the transparent SOA-MATS++ test controller and
// the bundle of memory-port signals that the normal FIFO logic and the test
// circuit each produce and that the test multiplexers choose between.
package fifo_test_pkg;

  // States of the test controller. UP_* is the ascending march element
  // (read a, write complement b); DN_* is the descending element (read b,
  // write a back, then read again to verify a).
  typedef enum logic [2:0] {
    T_IDLE = 3'd0,
    T_UP_R = 3'd1,
    T_UP_W = 3'd2,
    T_DN_R = 3'd3,
    T_DN_W = 3'd4,
    T_DN_V = 3'd5,
    T_DONE = 3'd6
  } mats_state_e;

endpackage
