// pp_div_pkg: types and constants shared by the parity-preserving
// non-restoring divider.
//
// The left-shift registers are steered by two mode lines, E (parallel load)
// and SV (save, i.e. hold), with the encoding of the divider's mode table:
//   SV=1        -> hold (E is a don't-care)
//   E=1, SV=0   -> parallel load
//   E=0, SV=0   -> shift left by one place
// The sequencer state type and the default operand width also live here.
// The width default (8) is this design's choice; the source analysis keeps
// the operand width a free parameter n.
package pp_div_pkg;

  // Default operand width n of the divider (dividend, divisor, quotient,
  // remainder). The accumulator is n+1 bits wide.
  localparam int unsigned DIV_N = 8;

  typedef struct packed {
    logic e;   // parallel-load select
    logic sv;  // hold ("save") select, dominates E
  } lsr_mode_t;

  localparam lsr_mode_t MODE_SHIFT = '{e: 1'b0, sv: 1'b0};
  localparam lsr_mode_t MODE_LOAD  = '{e: 1'b1, sv: 1'b0};
  localparam lsr_mode_t MODE_HOLD  = '{e: 1'b0, sv: 1'b1};

  // Sequencer states: idle (results valid once a division has run),
  // shift of the A:Q pair, add/subtract into A, final quotient-bit shift.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,
    ST_SHIFT  = 2'd1,
    ST_ADDSUB = 2'd2,
    ST_LASTQ  = 2'd3
  } div_state_t;

endpackage
