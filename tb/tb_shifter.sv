// tb_shifter: checks the four shift/rotate operations on all 256 operand
// values against an independent bit-by-bit model; other opcodes must pass
// the operand through.
`timescale 1ns/1ps
module tb_shifter;
  import gals_pkg::*;

  opcode_t op;
  word_t   a, y, e;
  int      checks = 0, failures = 0;

  shifter dut (.op(op), .a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      for (int v = 0; v < 256; v++) begin
        op = opcode_t'(o);
        a  = word_t'(v);
        e  = a;
        for (int i = 0; i < 8; i++) begin
          case (op)
            OP_SHL: e[i] = (i == 0) ? 1'b0 : a[i-1];
            OP_SHR: e[i] = (i == 7) ? 1'b0 : a[i+1];
            OP_ROL: e[i] = a[(i + 7) % 8];
            OP_ROR: e[i] = a[(i + 1) % 8];
            default: ;
          endcase
        end
        #1;
        checks++;
        if (y !== e) begin
          failures++;
          $display("FAIL: %s %02h -> %02h expected %02h", op.name(), a, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
