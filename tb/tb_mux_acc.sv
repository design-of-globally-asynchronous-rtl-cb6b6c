// tb_mux_acc: the testbench plays the register memory and the control unit
// (sources of {op, b}), the functional units (it checks the {op, acc, b}
// word sent to them and answers with its own model's result) and the
// control unit's completion receiver. After each operation the "done" word
// and the accumulator must equal the model. LDA and CLR must complete without
// a functional-unit request. The local clock must tick once for an operation
// finished in the module and twice for one that goes to the functional units.
`timescale 1ns/1ps
module tb_mux_acc;
  import gals_pkg::*;

  logic    clk = 0, rst = 0;
  logic    rm_req = 0, rm_ack, cu_req = 0, cu_ack;
  ma_cmd_t rm_data = '0;
  opcode_t cu_data = OP_NOP;
  logic    fu_req, fu_ack = 0, res_req = 0, res_ack;
  fu_cmd_t fu_data;
  word_t   res_data = '0;
  logic    done_req, done_ack = 0, clk_en;
  word_t   done_data, acc;
  word_t   acc_m = '0;
  int      checks = 0, failures = 0, ticks = 0, expected_ticks = 0;
  int      n_bypass = 0, n_fu = 0, n_rm = 0, n_cu = 0;

  always #5.5 clk = ~clk;

  mux_acc dut (.clk(clk), .rst(rst),
    .rm_req(rm_req), .rm_data(rm_data), .rm_ack(rm_ack),
    .cu_req(cu_req), .cu_data(cu_data), .cu_ack(cu_ack),
    .fu_req(fu_req), .fu_data(fu_data), .fu_ack(fu_ack),
    .res_req(res_req), .res_data(res_data), .res_ack(res_ack),
    .done_req(done_req), .done_data(done_data), .done_ack(done_ack),
    .acc(acc), .clk_en(clk_en));

  always @(posedge dut.gclk) if (!rst) ticks++;

  function automatic word_t model(opcode_t op, word_t a, word_t b);
    case (op)
      OP_LDA: return b;
      OP_CLR: return 8'h00;
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOT: return ~a;
      OP_SHL: return a << 1;
      OP_SHR: return a >> 1;
      OP_ROL: return {a[6:0], a[7]};
      OP_ROR: return {a[0], a[7:1]};
      OP_INC: return a + 8'd1;
      OP_DEC: return a - 8'd1;
      default: return a;
    endcase
  endfunction

  task automatic fail(string m);
    failures++;
    $display("FAIL: %s at %0t", m, $time);
  endtask

  task automatic do_op(opcode_t op, word_t b, bit from_rm);
    word_t e;
    int    t;
    bit    used_fu;
    e = model(op, acc_m, b);
    if (from_rm) begin
      rm_data = '{op: op, b: b};
      #0.5 rm_req = ~rm_req;
      n_rm++;
    end else begin
      cu_data = op;
      #0.5 cu_req = ~cu_req;
      n_cu++;
    end
    used_fu = 0;
    t = 0;
    while (done_req == done_ack && t < 2000) begin
      if (fu_req != fu_ack) begin
        used_fu = 1;
        checks++;
        if (fu_data.op !== op || fu_data.a !== acc_m || fu_data.b !== b)
          fail($sformatf("functional-unit word %s %02h %02h for %s %02h %02h",
               fu_data.op.name(), fu_data.a, fu_data.b, op.name(), acc_m, b));
        #3 fu_ack = ~fu_ack;
        #7 res_data = e;
        #0.5 res_req = ~res_req;
      end
      #0.5 t++;
    end
    checks++;
    if (done_req == done_ack) fail($sformatf("%s never completed", op.name()));
    checks++;
    if (done_data !== e || acc !== e)
      fail($sformatf("%s: done %02h acc %02h expected %02h", op.name(), done_data, acc, e));
    checks++;
    if (used_fu != needs_fu(op)) fail($sformatf("%s: wrong path", op.name()));
    if (used_fu) begin n_fu++; expected_ticks += 2; end
    else begin n_bypass++; expected_ticks += 1; end
    #0.5 done_ack = ~done_ack;
    acc_m = e;
    #40;
    checks++;
    if (res_ack != res_req || rm_ack != rm_req || cu_ack != cu_req) fail("channel left open");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_t op;
    #1 rst = 1;
    #30 rst = 0;
    #50;
    ticks = 0;
    do_op(OP_LDA, 8'hAA, 1);
    do_op(OP_ADD, 8'h03, 1);
    do_op(OP_CLR, 8'h00, 0);
    for (int i = 0; i < 400; i++) begin
      op = opcode_t'($urandom_range(1, 14));
      do_op(op, needs_reg(op) ? word_t'($urandom) : 8'h00, needs_reg(op));
    end
    checks++;
    if (ticks != expected_ticks) fail($sformatf("local clock ticked %0d times, expected %0d", ticks, expected_ticks));
    checks++;
    if (n_bypass == 0 || n_fu == 0 || n_rm == 0 || n_cu == 0) fail("a path was never used");
    $display("bypass=%0d fu=%0d from_rm=%0d from_cu=%0d", n_bypass, n_fu, n_rm, n_cu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
