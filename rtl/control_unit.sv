// control_unit: synchronous module 1 of the GALS processor (control unit).
//
// Runs on its own clock. It takes one instruction at a time from the
// environment over a request/acknowledge channel, decodes it, and starts it
// in the module that holds its first operand:
//   - operations with a register operand (LDA, ADD, SUB, AND, OR, XOR) go to
//     the register memory as {op, address};
//   - operations on the accumulator alone (NOT, shifts, INC, DEC, CLR) go
//     straight to the mux+accumulator as the opcode alone, bypassing the
//     memory;
//   - NOP and the reserved opcode complete at once.
// It then waits for the "done" word from the mux+accumulator and only then
// acknowledges the instruction, so the environment's acknowledge means the
// accumulator (processor output) already holds the result. The done word is
// the new accumulator value; the control unit needs only its arrival, so the
// value itself is not used here.
//
// Its local clock is paused (clock_gate) while it has nothing to do: when no
// instruction is waiting and while it waits for the rest of the processor.
// The partitioning and the request/acknowledge scheme are the processor's;
// the instruction set, the dispatch rule and the two-phase channels are this
// design's choices.
//
// Ports: `clk`, `rst` (active high, async); in_* = instruction channel from
// the environment; rm_* = channel to the register memory; ma_* = channel to
// the mux+accumulator; done_* = completion channel from the mux+accumulator;
// `clk_en` shows whether the local clock runs in the next cycle.
module control_unit
  import gals_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_req,
  input  instr_t  in_data,
  output logic    in_ack,
  output logic    rm_req,
  output rm_cmd_t rm_data,
  input  logic    rm_ack,
  output logic    ma_req,
  output opcode_t ma_data,
  input  logic    ma_ack,
  input  logic    done_req,
  input  word_t   done_data,
  output logic    done_ack,
  output logic    clk_en
);

  typedef enum logic {CU_IDLE, CU_WAIT} cu_state_t;

  logic      rst_l, gclk;
  cu_state_t state;

  logic    in_valid, in_take;
  instr_t  instr;
  logic    rm_ready, rm_send;
  logic    ma_ready, ma_send;
  logic [$bits(opcode_t)-1:0] ma_bits;
  logic    done_valid, done_take;
  word_t   done_word;

  reset_sync u_rst (.clk(clk), .rst_in(rst), .rst_out(rst_l));

  hs_rx #(.W($bits(instr_t)), .SYNC_STAGES(SYNC_STAGES)) u_in (
    .clk(clk), .rst(rst_l), .req(in_req), .din(in_data),
    .valid(in_valid), .dout(instr), .take(in_take), .ack(in_ack));

  hs_tx #(.W($bits(rm_cmd_t)), .SYNC_STAGES(SYNC_STAGES)) u_rm (
    .clk(clk), .rst(rst_l), .send(rm_send), .din({instr.op, instr.addr}),
    .ready(rm_ready), .req(rm_req), .dout(rm_data), .ack(rm_ack));

  hs_tx #(.W($bits(opcode_t)), .SYNC_STAGES(SYNC_STAGES)) u_ma (
    .clk(clk), .rst(rst_l), .send(ma_send), .din(instr.op),
    .ready(ma_ready), .req(ma_req), .dout(ma_bits), .ack(ma_ack));

  assign ma_data = opcode_t'(ma_bits);

  hs_rx #(.W($bits(word_t)), .SYNC_STAGES(SYNC_STAGES)) u_done (
    .clk(clk), .rst(rst_l), .req(done_req), .din(done_data),
    .valid(done_valid), .dout(done_word), .take(done_take), .ack(done_ack));

  // Decode and dispatch.
  always_comb begin
    in_take   = 1'b0;
    rm_send   = 1'b0;
    ma_send   = 1'b0;
    done_take = 1'b0;
    unique case (state)
      CU_IDLE: if (in_valid) begin
        if (is_nop(instr.op))        in_take = 1'b1;
        else if (needs_reg(instr.op)) rm_send = rm_ready;
        else                         ma_send = ma_ready;
      end
      CU_WAIT: if (done_valid) begin
        done_take = 1'b1;
        in_take   = 1'b1;
      end
      default: ;
    endcase
  end

  // Pausible clock: run only when there is something to act on.
  assign clk_en = rst_l || (state == CU_IDLE && in_valid) || (state == CU_WAIT && done_valid);

  clock_gate u_cg (.clk(clk), .en(clk_en), .gclk(gclk));

  always_ff @(posedge gclk or posedge rst_l) begin
    if (rst_l) state <= CU_IDLE;
    else if (rm_send || ma_send) state <= CU_WAIT;
    else if (done_take)          state <= CU_IDLE;
  end

endmodule
