// hs_tx: sending end of an asynchronous request/acknowledge channel.
//
// The channel between two locally clocked modules uses two-phase signalling
// with bundled data: the sender puts a word on `dout` and toggles `req` at the
// same clock edge, and holds both until the receiver toggles `ack` back. A
// transfer is therefore outstanding whenever req differs from ack. `ack`
// comes from another clock domain and passes through a SYNC_STAGES-flop
// synchronizer before it is compared.
//
// Interface (all on `clk` except `ack`): when `ready` is high the local logic
// may assert `send` for one cycle with `din`; the word is registered and the
// request raised at that edge. `ready` goes low at once and comes back
// SYNC_STAGES+ cycles after the receiver's acknowledge toggles.
// A request/acknowledge pair between clocked modules is the processor's own
// scheme; the two-phase encoding and the synchronizer depth (at least 2) are this
// design's choices.
module hs_tx #(
  parameter int unsigned W           = 8,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         send,
  input  logic [W-1:0] din,
  output logic         ready,
  output logic         req,
  output logic [W-1:0] dout,
  input  logic         ack
);

  logic [SYNC_STAGES-1:0] ack_sync;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ack_sync <= '0;
      req      <= 1'b0;
      dout     <= '0;
    end else begin
      ack_sync <= {ack_sync[SYNC_STAGES-2:0], ack};
      if (send && ready) begin
        req  <= ~req;
        dout <= din;
      end
    end
  end

  assign ready = (req == ack_sync[SYNC_STAGES-1]);

  // A word may only be offered when the previous one has been acknowledged.
  assert property (@(posedge clk) disable iff (rst) send |-> ready)
    else $error("hs_tx: send while a transfer is outstanding");

endmodule
