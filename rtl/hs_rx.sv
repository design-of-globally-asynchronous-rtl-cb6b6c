// hs_rx: receiving end of an asynchronous request/acknowledge channel.
//
// The sender's two-phase `req` passes through a SYNC_STAGES-flop
// synchronizer. A word is waiting (`valid`) while the synchronized request
// differs from the local `ack`. The bundled data `din` needs no synchronizer:
// the sender changed it together with req and holds it until it sees the
// acknowledge, and req reaches `valid` only after SYNC_STAGES edges, by which
// time din is settled. `dout` is din passed straight through.
//
// Interface (all on `clk` except `req` and `din`): the local logic asserts
// `take` in a cycle where `valid` is high; `ack` toggles at that edge and
// `valid` drops with it. The two-phase encoding and the synchronizer depth
// are this design's choices; the request/acknowledge pair is the processor's.
module hs_rx #(
  parameter int unsigned W           = 8,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         req,
  input  logic [W-1:0] din,
  output logic         valid,
  output logic [W-1:0] dout,
  input  logic         take,
  output logic         ack
);

  logic [SYNC_STAGES-1:0] req_sync;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      req_sync <= '0;
      ack      <= 1'b0;
    end else begin
      req_sync <= {req_sync[SYNC_STAGES-2:0], req};
      if (take && valid) ack <= ~ack;
    end
  end

  assign valid = (req_sync[SYNC_STAGES-1] != ack);
  assign dout  = din;

  assert property (@(posedge clk) disable iff (rst) take |-> valid)
    else $error("hs_rx: take without a waiting word");

endmodule
