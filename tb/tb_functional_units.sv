// tb_functional_units: the testbench plays the mux+accumulator. It sends
// random {op, a, b} words over the two-phase request/acknowledge channel,
// waits for the result word and checks it against its own model of every
// ALU and shifter operation. It also checks the pausible clock: the module's
// local clock must tick exactly twice per operation (operand capture and
// result send) and stay still otherwise, and the result must arrive within
// SYNC_STAGES + 3 module cycles of the request.
`timescale 1ns/1ps
module tb_functional_units;
  import gals_pkg::*;

  logic    clk = 0, rst = 0;
  logic    cmd_req = 0, cmd_ack, res_req, res_ack = 0, clk_en;
  fu_cmd_t cmd_data = '0;
  word_t   res_data;
  int      checks = 0, failures = 0, ticks = 0, ops = 0;

  always #2.5 clk = ~clk;

  functional_units dut (.clk(clk), .rst(rst), .cmd_req(cmd_req), .cmd_data(cmd_data),
    .cmd_ack(cmd_ack), .res_req(res_req), .res_data(res_data), .res_ack(res_ack),
    .clk_en(clk_en));

  always @(posedge dut.gclk) if (!rst) ticks++;

  function automatic word_t model(opcode_t op, word_t a, word_t b);
    case (op)
      OP_ADD: return word_t'(9'(a) + 9'(b));
      OP_SUB: return word_t'(9'(a) + 9'(~b) + 9'd1);
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOT: return a ^ 8'hFF;
      OP_SHL: return {a[6:0], 1'b0};
      OP_SHR: return {1'b0, a[7:1]};
      OP_ROL: return {a[6:0], a[7]};
      OP_ROR: return {a[0], a[7:1]};
      OP_INC: return word_t'(9'(a) + 9'd1);
      OP_DEC: return word_t'(9'(a) + 9'h0FF);
      default: return a;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_t op;
    word_t   a, b;
    int      t;
    #1 rst = 1;
    #20 rst = 0;
    #30;
    ticks = 0;
    for (int i = 0; i < 400; i++) begin
      op = opcode_t'($urandom_range(0, 15));
      if (!needs_fu(op)) op = OP_ADD;
      a = word_t'($urandom); b = word_t'($urandom);
      cmd_data = '{op: op, a: a, b: b};
      #0.5 cmd_req = ~cmd_req;
      t = 0;
      while (res_req == res_ack && t < 400) begin #0.5 t++; end
      checks++;
      if (t * 0.5 > (2 + 3) * 5 + 5) begin
        failures++;
        $display("FAIL: result after %0.1f ns", t * 0.5);
      end
      checks++;
      if (res_data !== model(op, a, b)) begin
        failures++;
        $display("FAIL: %s %02h %02h -> %02h expected %02h", op.name(), a, b, res_data, model(op, a, b));
      end
      checks++;
      if (cmd_ack != cmd_req) begin
        failures++;
        $display("FAIL: operation not acknowledged");
      end
      #0.5 res_ack = ~res_ack;
      ops++;
      repeat ($urandom_range(2, 10)) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (ticks != 2 * ops) begin
      failures++;
      $display("FAIL: local clock ticked %0d times for %0d operations", ticks, ops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
