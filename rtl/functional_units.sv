// functional_units: synchronous module 4 of the GALS processor (ALU and
// shifter).
//
// An operation {op, a, b} arrives over a request/acknowledge channel from
// the mux+accumulator and is registered in the operand registers. In the
// next cycle the ALU and the shifter both work on the registered operands,
// the opcode selects which result is used, and the result is sent back over
// a second channel. Latency inside the module: two local clock cycles from
// the request being seen to the result being sent.
//
// The local clock is paused (clock_gate) whenever no operation is waiting or
// in progress, which is most of the time: loads, clears, NOPs and the whole
// register-memory access never wake it. The module's contents (ALU and
// shifter) are the processor's; the operand registers and the timing are
// this design's choices.
//
// Ports: `clk`, `rst` (active high, async); cmd_* = operation channel from
// the mux+accumulator; res_* = result channel to it; `clk_en` shows whether
// the local clock runs.
module functional_units
  import gals_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    cmd_req,
  input  fu_cmd_t cmd_data,
  output logic    cmd_ack,
  output logic    res_req,
  output word_t   res_data,
  input  logic    res_ack,
  output logic    clk_en
);

  typedef enum logic {FU_IDLE, FU_SEND} fu_state_t;

  logic      rst_l, gclk;
  fu_state_t state;
  fu_cmd_t   cmd, opnd;
  logic      cmd_valid, cmd_take;
  logic      res_ready, res_send;
  word_t     alu_y, shift_y, y;

  reset_sync u_rst (.clk(clk), .rst_in(rst), .rst_out(rst_l));

  hs_rx #(.W($bits(fu_cmd_t)), .SYNC_STAGES(SYNC_STAGES)) u_cmd (
    .clk(clk), .rst(rst_l), .req(cmd_req), .din(cmd_data),
    .valid(cmd_valid), .dout(cmd), .take(cmd_take), .ack(cmd_ack));

  alu     u_alu (.op(opnd.op), .a(opnd.a), .b(opnd.b), .y(alu_y));
  shifter u_shf (.op(opnd.op), .a(opnd.a), .y(shift_y));

  assign y = is_shift(opnd.op) ? shift_y : alu_y;

  hs_tx #(.W($bits(word_t)), .SYNC_STAGES(SYNC_STAGES)) u_res (
    .clk(clk), .rst(rst_l), .send(res_send), .din(y),
    .ready(res_ready), .req(res_req), .dout(res_data), .ack(res_ack));

  assign cmd_take = (state == FU_IDLE) && cmd_valid;
  assign res_send = (state == FU_SEND) && res_ready;
  assign clk_en   = rst_l || cmd_take || (state == FU_SEND);

  clock_gate u_cg (.clk(clk), .en(clk_en), .gclk(gclk));

  always_ff @(posedge gclk or posedge rst_l) begin
    if (rst_l) begin
      state <= FU_IDLE;
      opnd  <= '0;
    end else if (cmd_take) begin
      state <= FU_SEND;
      opnd  <= cmd;
    end else if (res_send) begin
      state <= FU_IDLE;
    end
  end

endmodule
