// akb_pkg: types shared by the early-condition ALU.
//
// The operation code of the Operand Modifier Unit. The set of operations and
// their encoding are this design's own choice; only the idea that the OMU
// turns (a, b, operation) into per-bit propagate/generate signals comes from
// the original circuit description.
package akb_pkg;

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,  // A + B
    OP_ADC  = 3'd1,  // A + B + Cin
    OP_SUB  = 3'd2,  // A - B      (A + ~B + 1)
    OP_SBB  = 3'd3,  // A - B with carry (A + ~B + Cin)
    OP_NEXT = 3'd4,  // A + 1, the increment of the loop-closing NEXT instruction
    OP_AND  = 3'd5,  // A & B
    OP_OR   = 3'd6,  // A | B
    OP_XOR  = 3'd7   // A ^ B
  } alu_op_e;

endpackage
