// Shared types of the radix-4 modified Booth multiplier and its adders.
//
// booth_code_t is the three-signal Booth digit {-2,-1,0,+1,+2} produced by
// the encoder (neg, one, two, as in the MBE table). adder_kind_e selects the
// carry-propagate adder used inside the tree adder and the SPST adder:
// RIPPLE (a chain of full adders, the "conventional" adder of the proposed
// multiplier) or LADNER_FISCHER (the parallel-prefix adder of the extension
// multiplier that the ALU uses). ALU operation codes are listed as alu_op_e;
// the code-to-operation mapping is this design's choice except for 00 (add)
// and 01 (multiply).
package mbe_pkg;

  typedef struct packed {
    logic neg;   // digit is negative
    logic one;   // |digit| == 1
    logic two;   // |digit| == 2
  } booth_code_t;

  typedef enum logic {
    RIPPLE         = 1'b0,
    LADNER_FISCHER = 1'b1
  } adder_kind_e;

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_MUL = 2'b01,
    OP_AND = 2'b10,
    OP_OR  = 2'b11
  } alu_op_e;

endpackage
