// tb_control_unit: the testbench plays the environment (instruction
// sender), the register memory and the mux+accumulator. For each random
// instruction it checks that the control unit dispatches it to the right
// module with the right word ({op, address} to the memory for
// register-operand operations, the opcode to the mux+accumulator for the
// others, nothing for NOP), that the instruction is not acknowledged before
// the "done" word is returned, and that it is acknowledged after it. The
// local clock must tick once per NOP and twice per other instruction.
`timescale 1ns/1ps
module tb_control_unit;
  import gals_pkg::*;

  logic    clk = 0, rst = 0;
  logic    in_req = 0, in_ack;
  instr_t  in_data = '0;
  logic    rm_req, rm_ack = 0, ma_req, ma_ack = 0;
  rm_cmd_t rm_data;
  opcode_t ma_data;
  logic    done_req = 0, done_ack, clk_en;
  word_t   done_data = '0;
  int      checks = 0, failures = 0, ticks = 0, expected_ticks = 0;
  int      n_rm = 0, n_ma = 0, n_nop = 0;

  always #3.5 clk = ~clk;

  control_unit dut (.clk(clk), .rst(rst),
    .in_req(in_req), .in_data(in_data), .in_ack(in_ack),
    .rm_req(rm_req), .rm_data(rm_data), .rm_ack(rm_ack),
    .ma_req(ma_req), .ma_data(ma_data), .ma_ack(ma_ack),
    .done_req(done_req), .done_data(done_data), .done_ack(done_ack),
    .clk_en(clk_en));

  always @(posedge dut.gclk) if (!rst) ticks++;

  task automatic fail(string m);
    failures++;
    $display("FAIL: %s at %0t", m, $time);
  endtask

  task automatic do_instr(opcode_t op, raddr_t a);
    int t;
    in_data = '{op: op, unused: 1'b0, addr: a};
    #0.5 in_req = ~in_req;
    t = 0;
    while (rm_req == rm_ack && ma_req == ma_ack && in_ack != in_req && t < 400) begin
      #0.5 t++;
    end
    checks++;
    if (is_nop(op)) begin
      n_nop++;
      expected_ticks += 1;
      if (in_ack != in_req || rm_req != rm_ack || ma_req != ma_ack)
        fail($sformatf("%s not completed on its own", op.name()));
    end else begin
      expected_ticks += 2;
      if (needs_reg(op)) begin
        n_rm++;
        if (rm_req == rm_ack || rm_data.op !== op || rm_data.addr !== a)
          fail($sformatf("%s r%0d not sent to the register memory", op.name(), a));
      end else begin
        n_ma++;
        if (ma_req == ma_ack || ma_data !== op)
          fail($sformatf("%s not sent to the mux+accumulator", op.name()));
      end
      #30;
      checks++;
      if (in_ack == in_req) fail("instruction acknowledged before completion");
      rm_ack = rm_req;
      ma_ack = ma_req;
      #20;
      done_data = word_t'($urandom);
      #0.5 done_req = ~done_req;
      t = 0;
      while (in_ack != in_req && t < 400) begin #0.5 t++; end
      checks++;
      if (in_ack != in_req) fail("instruction never acknowledged");
      checks++;
      if (done_ack != done_req) fail("done word not taken");
    end
    #20;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1;
    #30 rst = 0;
    #40;
    ticks = 0;
    for (int i = 0; i < 400; i++) do_instr(opcode_t'($urandom_range(0, 15)), raddr_t'($urandom));
    checks++;
    if (ticks != expected_ticks) fail($sformatf("local clock ticked %0d times, expected %0d", ticks, expected_ticks));
    checks++;
    if (n_rm == 0 || n_ma == 0 || n_nop == 0) fail("a dispatch path was never used");
    $display("rm=%0d ma=%0d nop=%0d", n_rm, n_ma, n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
