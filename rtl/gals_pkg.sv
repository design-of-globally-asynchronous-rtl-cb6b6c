// gals_pkg: types and constants shared by the four locally clocked modules
// of the 8-bit GALS processor.
//
// The data path is 8 bits wide and the register memory has 8 words addressed
// by 3 bits; both numbers are the processor's pin widths. The instruction
// encoding below is this design's own: an instruction is one 8-bit word with
// the opcode in bits [7:4] and a register address in bits [2:0] (bit 3 is
// ignored). Every operation reads or writes the accumulator.
//
// The structs are the bundled data carried by the request/acknowledge
// channels between the modules.
package gals_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned RADDR_W = 3;
  localparam int unsigned DEPTH   = 1 << RADDR_W;

  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [RADDR_W-1:0] raddr_t;

  typedef enum logic [3:0] {
    OP_NOP = 4'h0,  // no operation
    OP_LDA = 4'h1,  // acc = R[r]
    OP_ADD = 4'h2,  // acc = acc + R[r]
    OP_SUB = 4'h3,  // acc = acc - R[r]
    OP_AND = 4'h4,  // acc = acc & R[r]
    OP_OR  = 4'h5,  // acc = acc | R[r]
    OP_XOR = 4'h6,  // acc = acc ^ R[r]
    OP_NOT = 4'h7,  // acc = ~acc
    OP_SHL = 4'h8,  // acc = acc << 1
    OP_SHR = 4'h9,  // acc = acc >> 1 (logical)
    OP_ROL = 4'hA,  // rotate left by one
    OP_ROR = 4'hB,  // rotate right by one
    OP_INC = 4'hC,  // acc = acc + 1
    OP_DEC = 4'hD,  // acc = acc - 1
    OP_CLR = 4'hE,  // acc = 0
    OP_RSV = 4'hF   // reserved, executes as NOP
  } opcode_t;

  // Instruction word as presented on the processor input.
  typedef struct packed {
    opcode_t op;
    logic    unused;
    raddr_t  addr;
  } instr_t;

  // Control unit -> register memory: read R[addr] for operation op.
  typedef struct packed {
    opcode_t op;
    raddr_t  addr;
  } rm_cmd_t;

  // Register memory or control unit -> mux+accumulator: operation and
  // second operand (zero when the operation has none).
  typedef struct packed {
    opcode_t op;
    word_t   b;
  } ma_cmd_t;

  // Mux+accumulator -> functional units: operation and both operands.
  typedef struct packed {
    opcode_t op;
    word_t   a;
    word_t   b;
  } fu_cmd_t;

  // Operation needs a register-memory operand.
  function automatic logic needs_reg(opcode_t op);
    return op inside {OP_LDA, OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR};
  endfunction

  // Operation is computed by the ALU or the shifter.
  function automatic logic needs_fu(opcode_t op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOT,
                      OP_SHL, OP_SHR, OP_ROL, OP_ROR, OP_INC, OP_DEC};
  endfunction

  // Operation is computed by the shifter (the rest of needs_fu by the ALU).
  function automatic logic is_shift(opcode_t op);
    return op inside {OP_SHL, OP_SHR, OP_ROL, OP_ROR};
  endfunction

  // Operation does nothing to the accumulator.
  function automatic logic is_nop(opcode_t op);
    return op inside {OP_NOP, OP_RSV};
  endfunction

endpackage
