// gals_processor: 8-bit accumulator processor built as a globally
// asynchronous, locally synchronous (GALS) system.
//
// The processor is split into four synchronous modules, each with its own
// clock input and its own pausible (gated) local clock:
//   SM1 control_unit      - CLK_ctrl_mpu - takes and decodes instructions
//   SM2 mux_acc           - CLK_dp_mpu   - multiplexer and accumulator
//   SM3 register_memory   - CLK_mem_mpu  - 8 x 8-bit register file
//   SM4 functional_units  - CLK_fu_mpu   - ALU and shifter
// No clock is shared. Modules exchange words only over two-phase
// request/acknowledge channels with bundled data (hs_tx/hs_rx), so the four
// clocks may have any frequencies and phases.
//
// One instruction flows as follows (-> is one channel transfer):
//   register operand:   env -> SM1 -> SM3 -> SM2 [-> SM4 -> SM2] -> SM1 -> env
//   accumulator only:   env -> SM1 -> SM2 [-> SM4 -> SM2] -> SM1 -> env
// The bracketed trip is skipped for LDA and CLR; NOP completes in SM1.
// Modules not involved keep their clocks paused.
//
// External interface: an instruction is offered on Input_mpu by toggling
// Req_mpu; Ack_mpu toggles back when it has completed, and Output_mpu (the
// accumulator) then holds its result. The register memory is loaded through
// Wr_mpu/Add_memory/In_memory, synchronously to CLK_mem_mpu, while no
// instruction is in flight. Rst is active high.
//
// The pin names and widths, the four-module partitioning, request/acknowledge
// communication and the pausible clocking follow the processor's
// description. Its pin list names only two clocks (control unit and
// mux+accumulator) although it gives four modules four frequencies; here
// each module has its own clock input, and Req_mpu/Ack_mpu are added so the
// environment is just one more asynchronous partner. The instruction set and
// everything inside the modules are this design's own.
module gals_processor
  import gals_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  word_t  Input_mpu,
  input  logic   Req_mpu,
  output logic   Ack_mpu,
  input  raddr_t Add_memory,
  input  word_t  In_memory,
  input  logic   CLK_ctrl_mpu,
  input  logic   CLK_dp_mpu,
  input  logic   CLK_mem_mpu,
  input  logic   CLK_fu_mpu,
  input  logic   Rst,
  input  logic   Wr_mpu,
  output word_t  Output_mpu
);

  // Channels: *_req and *_data belong to the sender, *_ack to the receiver.
  logic    cu_rm_req, cu_rm_ack;  rm_cmd_t cu_rm_data;
  logic    cu_ma_req, cu_ma_ack;  opcode_t cu_ma_data;
  logic    rm_ma_req, rm_ma_ack;  ma_cmd_t rm_ma_data;
  logic    ma_fu_req, ma_fu_ack;  fu_cmd_t ma_fu_data;
  logic    fu_ma_req, fu_ma_ack;  word_t   fu_ma_data;
  logic    ma_cu_req, ma_cu_ack;  word_t   ma_cu_data;
  logic    cu_en, ma_en, rm_en, fu_en;

  control_unit #(.SYNC_STAGES(SYNC_STAGES)) u_cu (
    .clk(CLK_ctrl_mpu), .rst(Rst),
    .in_req(Req_mpu), .in_data(instr_t'(Input_mpu)), .in_ack(Ack_mpu),
    .rm_req(cu_rm_req), .rm_data(cu_rm_data), .rm_ack(cu_rm_ack),
    .ma_req(cu_ma_req), .ma_data(cu_ma_data), .ma_ack(cu_ma_ack),
    .done_req(ma_cu_req), .done_data(ma_cu_data), .done_ack(ma_cu_ack),
    .clk_en(cu_en));

  mux_acc #(.SYNC_STAGES(SYNC_STAGES)) u_ma (
    .clk(CLK_dp_mpu), .rst(Rst),
    .rm_req(rm_ma_req), .rm_data(rm_ma_data), .rm_ack(rm_ma_ack),
    .cu_req(cu_ma_req), .cu_data(cu_ma_data), .cu_ack(cu_ma_ack),
    .fu_req(ma_fu_req), .fu_data(ma_fu_data), .fu_ack(ma_fu_ack),
    .res_req(fu_ma_req), .res_data(fu_ma_data), .res_ack(fu_ma_ack),
    .done_req(ma_cu_req), .done_data(ma_cu_data), .done_ack(ma_cu_ack),
    .acc(Output_mpu), .clk_en(ma_en));

  register_memory #(.SYNC_STAGES(SYNC_STAGES)) u_rm (
    .clk(CLK_mem_mpu), .rst(Rst),
    .wr(Wr_mpu), .waddr(Add_memory), .wdata(In_memory),
    .cmd_req(cu_rm_req), .cmd_data(cu_rm_data), .cmd_ack(cu_rm_ack),
    .out_req(rm_ma_req), .out_data(rm_ma_data), .out_ack(rm_ma_ack),
    .clk_en(rm_en));

  functional_units #(.SYNC_STAGES(SYNC_STAGES)) u_fu (
    .clk(CLK_fu_mpu), .rst(Rst),
    .cmd_req(ma_fu_req), .cmd_data(ma_fu_data), .cmd_ack(ma_fu_ack),
    .res_req(fu_ma_req), .res_data(fu_ma_data), .res_ack(fu_ma_ack),
    .clk_en(fu_en));

endmodule
