// Shared types and constants of the 4-bit pipelined array multiplier.
//
// The multiplier takes two 4-bit unsigned operands and produces an 8-bit
// product through five pipeline stages: three rows of carry-save adders and a
// 3-bit carry-propagate adder split over two stages. The synchronous and the
// micropipelined version share the same datapath; what travels between two
// latch ranks is one mult_stage_t word.
//
// The word carries the operands down the pipe (later rows still need them),
// one sum bit and one carry bit per product column, and the ripple carry that
// the fourth stage hands to the fifth. Bits a stage does not use are simply
// passed on; synthesis removes the latches of bits that are never read.
package ppl_mult_pkg;

  localparam int unsigned OP_W    = 4;          // operand width
  localparam int unsigned PROD_W  = 2 * OP_W;   // product width
  localparam int unsigned STAGES  = 5;          // logic stages between latch ranks
  localparam int unsigned RANKS   = STAGES + 1; // latch ranks, input rank included

  // Full adder cell used when the PPL full adder is mapped onto ACT-1 modules.
  typedef enum logic {
    FA_THREE_MODULES = 1'b0,  // inverter + two multiplexer modules, two logic levels to the sum
    FA_FA1B_INV      = 1'b1   // library FA1B (positive sum) followed by an inverter
  } fa_style_e;

  typedef struct packed {
    logic [OP_W-1:0]   a;   // multiplicand, carried down the pipe
    logic [OP_W-1:0]   b;   // multiplier, carried down the pipe
    logic [PROD_W-1:0] s;   // sum bit per column; finished product bits included
    logic [PROD_W-1:0] c;   // carry bit entering each column from the row above
    logic              rc;  // ripple carry from stage 4 into column 6
  } mult_stage_t;

  localparam int unsigned STAGE_W = $bits(mult_stage_t);

endpackage
