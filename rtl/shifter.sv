// shifter: the shift/rotate half of the functional-units module.
//
// Purely combinational. It shifts or rotates the 8-bit operand a by one
// place: SHL and SHR shift in a zero (logical shifts), ROL and ROR move the
// bit that falls out into the other end. Any other opcode gives y = a. That
// the functional units hold a shifter is the processor's partitioning; the
// operation set and the one-place shift are this design's choice.
module shifter
  import gals_pkg::*;
(
  input  opcode_t op,
  input  word_t   a,
  output word_t   y
);

  always_comb begin
    unique case (op)
      OP_SHL:  y = {a[DATA_W-2:0], 1'b0};
      OP_SHR:  y = {1'b0, a[DATA_W-1:1]};
      OP_ROL:  y = {a[DATA_W-2:0], a[DATA_W-1]};
      OP_ROR:  y = {a[0], a[DATA_W-1:1]};
      default: y = a;
    endcase
  end

endmodule
