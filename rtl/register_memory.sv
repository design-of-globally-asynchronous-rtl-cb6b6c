// register_memory: synchronous module 3 of the GALS processor (register
// memory).
//
// An 8-word by 8-bit register file with one write port and one read port.
// The write port (wr, waddr, wdata) is driven from outside the processor,
// synchronously to this module's clock, to load operands. The read port
// serves the control unit: a request {op, address} arrives over a
// request/acknowledge channel, the word is read (asynchronous read, as in
// small FPGA LUT RAM) and {op, word} is sent on to the mux+accumulator in the
// same cycle. A write and a read of the same word in one cycle return the
// old word.
//
// The local clock, which only the storage uses, is paused (clock_gate)
// unless a write or a read request is present. The size and the external
// write port are the processor's; the channel format and the read timing are
// this design's choices. The storage has no reset, like a RAM: load a word
// before reading it.
//
// Ports: `clk`, `rst` (active high, async); wr/waddr/wdata = external write;
// cmd_* = request channel from the control unit; out_* = operand channel to
// the mux+accumulator; `clk_en` shows whether the local clock runs.
module register_memory
  import gals_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    wr,
  input  raddr_t  waddr,
  input  word_t   wdata,
  input  logic    cmd_req,
  input  rm_cmd_t cmd_data,
  output logic    cmd_ack,
  output logic    out_req,
  output ma_cmd_t out_data,
  input  logic    out_ack,
  output logic    clk_en
);

  logic    rst_l, gclk;
  logic    cmd_valid, cmd_take;
  rm_cmd_t cmd;
  logic    out_ready;
  word_t   mem [DEPTH];
  ma_cmd_t rd;

  reset_sync u_rst (.clk(clk), .rst_in(rst), .rst_out(rst_l));

  hs_rx #(.W($bits(rm_cmd_t)), .SYNC_STAGES(SYNC_STAGES)) u_cmd (
    .clk(clk), .rst(rst_l), .req(cmd_req), .din(cmd_data),
    .valid(cmd_valid), .dout(cmd), .take(cmd_take), .ack(cmd_ack));

  assign rd.op = cmd.op;
  assign rd.b  = mem[cmd.addr];
  assign cmd_take = cmd_valid && out_ready;

  hs_tx #(.W($bits(ma_cmd_t)), .SYNC_STAGES(SYNC_STAGES)) u_out (
    .clk(clk), .rst(rst_l), .send(cmd_take), .din(rd),
    .ready(out_ready), .req(out_req), .dout(out_data), .ack(out_ack));

  assign clk_en = rst_l || wr || cmd_valid;

  clock_gate u_cg (.clk(clk), .en(clk_en), .gclk(gclk));

  always_ff @(posedge gclk) begin
    if (wr) mem[waddr] <= wdata;
  end

endmodule
