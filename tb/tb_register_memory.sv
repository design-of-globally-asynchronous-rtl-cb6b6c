// tb_register_memory: the testbench loads the register file through the
// external write port and then plays the control unit (read requests) and
// the mux+accumulator (receiver of {op, word}). Every word read must be the
// last one written to that address, with the opcode passed through. Writes
// are interleaved with reads. The local clock must tick once per write and
// once per read request and be paused otherwise.
`timescale 1ns/1ps
module tb_register_memory;
  import gals_pkg::*;

  logic    clk = 0, rst = 0;
  logic    wr = 0;
  raddr_t  waddr = '0;
  word_t   wdata = '0;
  logic    cmd_req = 0, cmd_ack, out_req, out_ack = 0, clk_en;
  rm_cmd_t cmd_data = '0;
  ma_cmd_t out_data;
  word_t   shadow [DEPTH];
  int      checks = 0, failures = 0, ticks = 0, expected_ticks = 0;

  always #6.5 clk = ~clk;

  register_memory dut (.clk(clk), .rst(rst), .wr(wr), .waddr(waddr), .wdata(wdata),
    .cmd_req(cmd_req), .cmd_data(cmd_data), .cmd_ack(cmd_ack),
    .out_req(out_req), .out_data(out_data), .out_ack(out_ack), .clk_en(clk_en));

  always @(posedge dut.gclk) if (!rst) ticks++;

  task automatic write_word(raddr_t a, word_t d);
    @(negedge clk);
    wr = 1; waddr = a; wdata = d;
    @(negedge clk);
    wr = 0;
    shadow[a] = d;
    expected_ticks++;
  endtask

  task automatic read_word(raddr_t a, opcode_t op);
    int t;
    cmd_data = '{op: op, addr: a};
    #0.5 cmd_req = ~cmd_req;
    t = 0;
    while (out_req == out_ack && t < 400) begin #0.5 t++; end
    checks++;
    if (out_req == out_ack) begin
      failures++;
      $display("FAIL: no operand for read of r%0d", a);
    end else begin
      checks++;
      if (out_data.b !== shadow[a] || out_data.op !== op) begin
        failures++;
        $display("FAIL: read r%0d got %s %02h expected %s %02h", a,
                 out_data.op.name(), out_data.b, op.name(), shadow[a]);
      end
    end
    #0.5 out_ack = ~out_ack;
    expected_ticks++;
    repeat (4) @(posedge clk);
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
    for (int i = 0; i < DEPTH; i++) write_word(raddr_t'(i), word_t'($urandom));
    for (int i = 0; i < DEPTH; i++) read_word(raddr_t'(i), OP_LDA);
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 1) == 0) write_word(raddr_t'($urandom), word_t'($urandom));
      read_word(raddr_t'($urandom), opcode_t'($urandom_range(1, 6)));
    end
    repeat (5) @(posedge clk);
    checks++;
    if (ticks != expected_ticks) begin
      failures++;
      $display("FAIL: local clock ticked %0d times, expected %0d", ticks, expected_ticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
