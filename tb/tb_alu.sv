// tb_alu: checks every ALU operation against an independent model, on
// corner operands and on random ones. Opcodes the ALU does not implement
// must pass the first operand through.
`timescale 1ns/1ps
module tb_alu;
  import gals_pkg::*;

  opcode_t op;
  word_t   a, b, y;
  int      checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic word_t ref_y(opcode_t o, word_t x, word_t z);
    int r;
    case (o)
      OP_ADD: r = int'(x) + int'(z);
      OP_SUB: r = int'(x) - int'(z) + 256;
      OP_AND: return x & z;
      OP_OR:  return x | z;
      OP_XOR: return x ^ z;
      OP_NOT: return 8'hFF - x;
      OP_INC: r = int'(x) + 1;
      OP_DEC: r = int'(x) + 255;
      default: return x;
    endcase
    return word_t'(r % 256);
  endfunction

  task automatic check(opcode_t o, word_t x, word_t z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== ref_y(o, x, z)) begin
      failures++;
      $display("FAIL: %s %02h %02h -> %02h expected %02h", o.name(), x, z, y, ref_y(o, x, z));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [4] = '{8'h00, 8'h01, 8'h7F, 8'hFF};
    for (int o = 0; o < 16; o++) begin
      foreach (corner[i]) foreach (corner[j]) check(opcode_t'(o), corner[i], corner[j]);
      for (int k = 0; k < 200; k++) check(opcode_t'(o), word_t'($urandom), word_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
