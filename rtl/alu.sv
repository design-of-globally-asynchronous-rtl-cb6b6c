// alu: the arithmetic and logic half of the functional-units module.
//
// Purely combinational. It computes y = op(a, b) on 8-bit words for the
// arithmetic and logic opcodes of gals_pkg (ADD, SUB, AND, OR, XOR, NOT, INC,
// DEC); carries and borrows are dropped (results wrap modulo 256). Any other
// opcode gives y = a. That the functional units hold an ALU is the
// processor's partitioning; the operation set is this design's choice.
module alu
  import gals_pkg::*;
(
  input  opcode_t op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_NOT:  y = ~a;
      OP_INC:  y = a + word_t'(1);
      OP_DEC:  y = a - word_t'(1);
      default: y = a;
    endcase
  end

endmodule
