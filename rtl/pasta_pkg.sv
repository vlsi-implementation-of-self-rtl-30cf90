// pasta_pkg: types and constants shared by the parallel self-timed adder (PASTA).
//
// Every half adder of the adder is in one of the states (C_{i+1}, S_i) of its
// state diagram: its carry out and its sum bit. ha_state_t holds that pair.
// The state (1,1) never occurs because a half adder cannot produce it.
// PASTA_WIDTH is the operand width of the 16-bit configuration.
package pasta_pkg;

  // Operand width of the main configuration (16-bit operands).
  localparam int unsigned PASTA_WIDTH = 16;

  // State of one bit slice: carry out C_{i+1} and sum S_i.
  typedef struct packed {
    logic c;
    logic s;
  } ha_state_t;

endpackage
