// omu: Operand Modifier Unit.
//
// Turns the operands and the operation into the per-bit carry propagate and
// generate signals that both the adder and the condition detectors consume:
//   arithmetic:  b' = b, ~b or 0;  p = a ^ b', g = a & b';  c0 from the op
//   logic:       p = a op b, g = 0, c0 = 0, so the adder's r = p is the result
// Because the detectors take p/g rather than a/b, they evaluate "A op B = K"
// for every operation here, not only for addition.
//
// Operations (akb_pkg::alu_op_e): ADD, ADC (c0 = cin), SUB (~b, c0 = 1),
// SBB (~b, c0 = cin), NEXT (b' = 0, c0 = 1: increment), AND, OR, XOR.
// The role of the unit follows the classic OMU + adder ALU; the operation set,
// its encoding and the logic-operation trick are this design's own choices.
// Interface: a, b [N-1:0], op, cin -> p, g [N-1:0], c0. Purely combinational.
module omu
  import akb_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      op,
  input  logic         cin,
  output logic [N-1:0] p,
  output logic [N-1:0] g,
  output logic         c0
);

  logic [N-1:0] bm;  // modified B operand for arithmetic operations

  always_comb begin
    bm = b;
    c0 = 1'b0;
    p  = '0;
    g  = '0;
    unique case (op)
      OP_ADD:  begin bm = b;  c0 = 1'b0; end
      OP_ADC:  begin bm = b;  c0 = cin;  end
      OP_SUB:  begin bm = ~b; c0 = 1'b1; end
      OP_SBB:  begin bm = ~b; c0 = cin;  end
      OP_NEXT: begin bm = '0; c0 = 1'b1; end
      default: begin bm = '0; c0 = 1'b0; end
    endcase
    unique case (op)
      OP_AND:  begin p = a & b; g = '0; end
      OP_OR:   begin p = a | b; g = '0; end
      OP_XOR:  begin p = a ^ b; g = '0; end
      default: begin p = a ^ bm; g = a & bm; end
    endcase
  end

endmodule
