// tb_gals_processor: end-to-end test of the GALS processor at its default
// parameters.
//
// The four module clocks start at unrelated periods (7, 11, 13 and 5 ns)
// and are later changed to other ratios, ending with four equal clocks. The
// testbench acts as the environment: it loads the register memory through
// the write port, offers instructions with the two-phase Req_mpu/Ack_mpu
// handshake, and after each acknowledge compares Output_mpu with its own
// model of the accumulator. It starts with a short directed program (load,
// ADD, then one of every other operation) and continues with random
// instructions interleaved with random register writes.
//
// It also checks the pausible clocks: every local (gated) clock must tick
// exactly as often as the work given to its module requires, and each
// module's clock must have been paused for some cycles. Every mechanism
// (register-operand path, memory bypass, functional-unit bypass, ALU,
// shifter, NOP, external write, clock pause per module) is counted and must
// occur at least once.
`timescale 1ns/1ps
module tb_gals_processor;
  import gals_pkg::*;

  localparam int N_RANDOM = 300;

  logic   clk_cu = 0, clk_ma = 0, clk_rm = 0, clk_fu = 0;
  logic   rst = 0;
  word_t  instr_w = '0;
  logic   req = 0;
  logic   ack;
  raddr_t waddr = '0;
  word_t  wdata = '0;
  logic   wr = 0;
  word_t  out;

  // Half periods; changed between test phases to vary the clock ratios.
  realtime hp_cu = 3.5, hp_ma = 5.5, hp_rm = 6.5, hp_fu = 2.5;
  always #hp_cu clk_cu = ~clk_cu;
  always #hp_ma clk_ma = ~clk_ma;
  always #hp_rm clk_rm = ~clk_rm;
  always #hp_fu clk_fu = ~clk_fu;

  gals_processor dut (
    .Input_mpu(instr_w), .Req_mpu(req), .Ack_mpu(ack),
    .Add_memory(waddr), .In_memory(wdata),
    .CLK_ctrl_mpu(clk_cu), .CLK_dp_mpu(clk_ma), .CLK_mem_mpu(clk_rm), .CLK_fu_mpu(clk_fu),
    .Rst(rst), .Wr_mpu(wr), .Output_mpu(out));

  int checks = 0, failures = 0;

  // Reference model.
  word_t regs [DEPTH];
  word_t acc_m = '0;

  // Mechanism counters.
  int n_regpath = 0, n_rmbypass = 0, n_fubypass = 0, n_alu = 0, n_shift = 0;
  int n_nop = 0, n_write = 0;
  // Expected and observed local clock ticks.
  int exp_cu = 0, exp_ma = 0, exp_rm = 0, exp_fu = 0;
  int got_cu = 0, got_ma = 0, got_rm = 0, got_fu = 0;
  int paused_cu = 0, paused_ma = 0, paused_rm = 0, paused_fu = 0;
  bit counting = 0;
  // Instruction latency (request to acknowledge, ns) per clock setup and
  // path: 0 NOP, 1 LDA, 2 register+ALU/shifter, 3 CLR, 4 accumulator+ALU/shifter.
  int cur_phase = 0;
  int lat_sum [4][5];
  int lat_n   [4][5];

  always @(posedge dut.u_cu.gclk) if (counting) got_cu++;
  always @(posedge dut.u_ma.gclk) if (counting) got_ma++;
  always @(posedge dut.u_rm.gclk) if (counting) got_rm++;
  always @(posedge dut.u_fu.gclk) if (counting) got_fu++;
  always @(posedge clk_cu) if (counting && !dut.u_cu.clk_en) paused_cu++;
  always @(posedge clk_ma) if (counting && !dut.u_ma.clk_en) paused_ma++;
  always @(posedge clk_rm) if (counting && !dut.u_rm.clk_en) paused_rm++;
  always @(posedge clk_fu) if (counting && !dut.u_fu.clk_en) paused_fu++;

  function automatic word_t model(opcode_t op, word_t a, word_t b);
    case (op)
      OP_LDA: return b;
      OP_ADD: return word_t'(a + b);
      OP_SUB: return word_t'(a - b);
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_NOT: return ~a;
      OP_SHL: return word_t'(a * 2);
      OP_SHR: return a / 2;
      OP_ROL: return word_t'(a * 2) | word_t'(a >> 7);
      OP_ROR: return (a / 2) | (a[0] ? 8'h80 : 8'h00);
      OP_INC: return a + 8'd1;
      OP_DEC: return a - 8'd1;
      OP_CLR: return 8'h00;
      default: return a;
    endcase
  endfunction

  task automatic write_reg(raddr_t a, word_t d);
    @(negedge clk_rm);
    wr = 1; waddr = a; wdata = d;
    @(negedge clk_rm);
    wr = 0;
    regs[a] = d;
    n_write++;
    exp_rm++;
  endtask

  task automatic run(opcode_t op, raddr_t a);
    word_t expected;
    int    t;
    expected = model(op, acc_m, regs[a]);
    instr_w = {op, 1'b0, a};
    #1 req = ~req;
    t = 0;
    while (ack != req && t < 2000) begin
      #1 t++;
    end
    checks++;
    if (ack != req) begin
      failures++;
      $display("FAIL: no acknowledge for op %s", op.name());
    end
    begin
      int c;
      c = is_nop(op) ? 0 : (op == OP_LDA) ? 1 : needs_reg(op) ? 2 : (op == OP_CLR) ? 3 : 4;
      lat_sum[cur_phase][c] += t;
      lat_n[cur_phase][c]++;
    end
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL: op %s r%0d acc %02h -> got %02h expected %02h",
               op.name(), a, acc_m, out, expected);
    end
    acc_m = expected;
    // Bookkeeping of the paths taken and the clock ticks each needs.
    if (is_nop(op)) begin
      n_nop++; exp_cu += 1;
    end else begin
      exp_cu += 2;
      if (needs_reg(op)) begin n_regpath++; exp_rm++; end
      else n_rmbypass++;
      if (needs_fu(op)) begin
        exp_ma += 2; exp_fu += 2;
        if (is_shift(op)) n_shift++; else n_alu++;
      end else begin
        exp_ma += 1; n_fubypass++;
      end
    end
    #20;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  task automatic same(string what, int got, int expected);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL: %s ticked %0d times, expected %0d", what, got, expected);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (regs[i]) regs[i] = '0;
    foreach (lat_sum[p, c]) begin lat_sum[p][c] = 0; lat_n[p][c] = 0; end
    #1 rst = 1;
    #40 rst = 0;
    #100;
    counting = 1;
    for (int i = 0; i < DEPTH; i++) write_reg(raddr_t'(i), word_t'($urandom));
    // Directed start: the ADD example, then every other operation once.
    write_reg(3'd1, 8'b0000_0011);
    write_reg(3'd2, 8'b1010_1010);
    run(OP_LDA, 3'd2);
    run(OP_ADD, 3'd1);
    for (int o = 0; o < 16; o++) run(opcode_t'(o), raddr_t'(o));
    // Random instructions and register writes, under three clock setups:
    // unrelated periods, a slow functional unit behind a fast control unit,
    // and four equal clocks.
    for (int phase = 0; phase < 3; phase++) begin
      cur_phase = phase + 1;
      case (phase)
        1: begin hp_cu = 1.5; hp_ma = 4.0; hp_rm = 2.0; hp_fu = 8.5; end
        2: begin hp_cu = 5.0; hp_ma = 5.0; hp_rm = 5.0; hp_fu = 5.0; end
        default: ;
      endcase
      for (int i = 0; i < N_RANDOM; i++) begin
        if ($urandom_range(0, 5) == 0) write_reg(raddr_t'($urandom), word_t'($urandom));
        run(opcode_t'($urandom_range(0, 15)), raddr_t'($urandom));
      end
    end
    #200;
    counting = 0;
    same("control unit clock", got_cu, exp_cu);
    same("mux+acc clock", got_ma, exp_ma);
    same("register memory clock", got_rm, exp_rm);
    same("functional units clock", got_fu, exp_fu);
    need("register operand path", n_regpath);
    need("register memory bypass", n_rmbypass);
    need("functional unit bypass", n_fubypass);
    need("ALU operation", n_alu);
    need("shifter operation", n_shift);
    need("NOP", n_nop);
    need("external register write", n_write);
    need("control unit clock paused", paused_cu);
    need("mux+acc clock paused", paused_ma);
    need("register memory clock paused", paused_rm);
    need("functional units clock paused", paused_fu);
    $display("paths: reg=%0d rm_bypass=%0d fu_bypass=%0d alu=%0d shift=%0d nop=%0d writes=%0d",
             n_regpath, n_rmbypass, n_fubypass, n_alu, n_shift, n_nop, n_write);
    for (int p = 0; p < 4; p++)
      $display("latency setup %0d (ns): NOP %0d  LDA %0d  reg+FU %0d  CLR %0d  acc+FU %0d", p,
               lat_sum[p][0] / (lat_n[p][0] > 0 ? lat_n[p][0] : 1),
               lat_sum[p][1] / (lat_n[p][1] > 0 ? lat_n[p][1] : 1),
               lat_sum[p][2] / (lat_n[p][2] > 0 ? lat_n[p][2] : 1),
               lat_sum[p][3] / (lat_n[p][3] > 0 ? lat_n[p][3] : 1),
               lat_sum[p][4] / (lat_n[p][4] > 0 ? lat_n[p][4] : 1));
    $display("paused cycles: cu=%0d ma=%0d rm=%0d fu=%0d",
             paused_cu, paused_ma, paused_rm, paused_fu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
