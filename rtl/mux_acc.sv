// mux_acc: synchronous module 2 of the GALS processor (multiplexer and
// accumulator).
//
// Holds the 8-bit accumulator, which is also the processor output. An
// operation arrives either as {op, b} from the register memory (operations
// with a register operand) or as the opcode alone from the control unit
// (operations on the accumulator alone, taken with b = 0). Then:
//   - LDA and CLR are finished here: the multiplexer loads b or zero;
//   - every other operation is sent to the functional units as
//     {op, acc, b}, and the multiplexer loads their result when it returns.
// In both cases the new accumulator value is sent to the control unit as the
// "done" word in the cycle the accumulator is written.
//
// The local clock is paused (clock_gate) while no operation is waiting and
// while the functional units are working. The module's name and role are
// the processor's; which operations bypass the functional units, the
// channel formats and the timing are this design's choices.
//
// Ports: `clk`, `rst` (active high, async); rm_* = operand channel from the
// register memory; cu_* = operation channel from the control unit; fu_* =
// channel to the functional units; res_* = result channel back from them;
// done_* = completion channel to the control unit; `acc` = accumulator;
// `clk_en` shows whether the local clock runs.
module mux_acc
  import gals_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    rm_req,
  input  ma_cmd_t rm_data,
  output logic    rm_ack,
  input  logic    cu_req,
  input  opcode_t cu_data,
  output logic    cu_ack,
  output logic    fu_req,
  output fu_cmd_t fu_data,
  input  logic    fu_ack,
  input  logic    res_req,
  input  word_t   res_data,
  output logic    res_ack,
  output logic    done_req,
  output word_t   done_data,
  input  logic    done_ack,
  output word_t   acc,
  output logic    clk_en
);

  typedef enum logic {MA_IDLE, MA_WAIT_FU} ma_state_t;
  typedef enum logic [1:0] {SEL_HOLD, SEL_OPERAND, SEL_ZERO, SEL_RESULT} acc_sel_t;

  logic      rst_l, gclk;
  ma_state_t state;
  acc_sel_t  sel;
  word_t     acc_d;

  logic    rm_valid, rm_take, cu_valid, cu_take;
  ma_cmd_t rm_cmd, cmd;
  opcode_t cu_op;
  logic [$bits(opcode_t)-1:0] cu_bits;
  logic    cmd_valid;
  logic    fu_ready, fu_send;
  logic    res_valid, res_take;
  word_t   res;
  logic    done_ready, done_send;

  reset_sync u_rst (.clk(clk), .rst_in(rst), .rst_out(rst_l));

  hs_rx #(.W($bits(ma_cmd_t)), .SYNC_STAGES(SYNC_STAGES)) u_rm (
    .clk(clk), .rst(rst_l), .req(rm_req), .din(rm_data),
    .valid(rm_valid), .dout(rm_cmd), .take(rm_take), .ack(rm_ack));

  hs_rx #(.W($bits(opcode_t)), .SYNC_STAGES(SYNC_STAGES)) u_cu (
    .clk(clk), .rst(rst_l), .req(cu_req), .din(cu_data),
    .valid(cu_valid), .dout(cu_bits), .take(cu_take), .ack(cu_ack));

  assign cu_op = opcode_t'(cu_bits);

  hs_tx #(.W($bits(fu_cmd_t)), .SYNC_STAGES(SYNC_STAGES)) u_fu (
    .clk(clk), .rst(rst_l), .send(fu_send), .din({cmd.op, acc, cmd.b}),
    .ready(fu_ready), .req(fu_req), .dout(fu_data), .ack(fu_ack));

  hs_rx #(.W($bits(word_t)), .SYNC_STAGES(SYNC_STAGES)) u_res (
    .clk(clk), .rst(rst_l), .req(res_req), .din(res_data),
    .valid(res_valid), .dout(res), .take(res_take), .ack(res_ack));

  hs_tx #(.W($bits(word_t)), .SYNC_STAGES(SYNC_STAGES)) u_done (
    .clk(clk), .rst(rst_l), .send(done_send), .din(acc_d),
    .ready(done_ready), .req(done_req), .dout(done_data), .ack(done_ack));

  // The register memory has priority; only one source is active at a time
  // because the control unit issues one instruction at a time.
  assign cmd_valid = rm_valid || cu_valid;
  assign cmd       = rm_valid ? rm_cmd : '{op: cu_op, b: '0};

  always_comb begin
    sel       = SEL_HOLD;
    rm_take   = 1'b0;
    cu_take   = 1'b0;
    fu_send   = 1'b0;
    res_take  = 1'b0;
    done_send = 1'b0;
    unique case (state)
      MA_IDLE: if (cmd_valid) begin
        if (needs_fu(cmd.op)) begin
          fu_send = fu_ready;
        end else if (done_ready) begin
          done_send = 1'b1;
          sel = (cmd.op == OP_LDA) ? SEL_OPERAND :
                (cmd.op == OP_CLR) ? SEL_ZERO : SEL_HOLD;
        end
        rm_take = rm_valid && (fu_send || done_send);
        cu_take = !rm_valid && (fu_send || done_send);
      end
      MA_WAIT_FU: if (res_valid && done_ready) begin
        res_take  = 1'b1;
        done_send = 1'b1;
        sel       = SEL_RESULT;
      end
      default: ;
    endcase
  end

  // The multiplexer in front of the accumulator.
  always_comb begin
    unique case (sel)
      SEL_OPERAND: acc_d = cmd.b;
      SEL_ZERO:    acc_d = '0;
      SEL_RESULT:  acc_d = res;
      default:     acc_d = acc;
    endcase
  end

  assign clk_en = rst_l || (state == MA_IDLE && cmd_valid) || (state == MA_WAIT_FU && res_valid);

  clock_gate u_cg (.clk(clk), .en(clk_en), .gclk(gclk));

  always_ff @(posedge gclk or posedge rst_l) begin
    if (rst_l) begin
      state <= MA_IDLE;
      acc   <= '0;
    end else begin
      acc <= acc_d;
      if (fu_send)       state <= MA_WAIT_FU;
      else if (res_take) state <= MA_IDLE;
    end
  end

endmodule
