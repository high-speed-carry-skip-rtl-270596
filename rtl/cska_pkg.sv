// Shared constants of the Kogge-Stone carry skip adder.
//
// The adder is a 32-bit carry skip adder built from equal 4-bit stages.
// The third stage, the nucleus, is a 4-bit Kogge-Stone parallel prefix
// adder; the other stages are ripple carry blocks with AOI/OAI skip logic
// and incrementation blocks. The 32-bit width and the 4-bit stage size
// follow the module names of the reference implementation (a 32-bit top,
// 4-bit adder and 4-bit Kogge-Stone modules); the nucleus position follows
// the description of the prefix network sitting between the second and the
// third ripple carry block. The carry polarity type documents the
// alternating true/complemented carry of the AOI/OAI skip chain.
package cska_pkg;

  // Operand width of the complete adder.
  localparam int unsigned ADDER_WIDTH = 32;
  // Width of every stage (fixed stage size).
  localparam int unsigned STAGE_WIDTH = 4;
  // Index (1-based, LSB stage = 1) of the Kogge-Stone nucleus stage.
  localparam int unsigned NUCLEUS_STAGE = 3;

  // Polarity of a carry on the skip chain: AOI stages take a true carry and
  // deliver a complemented one, OAI stages the reverse.
  typedef enum logic {
    CARRY_TRUE     = 1'b0,
    CARRY_INVERTED = 1'b1
  } carry_pol_e;

endpackage
