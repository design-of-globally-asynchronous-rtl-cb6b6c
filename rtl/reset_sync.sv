// reset_sync: local copy of the processor reset for one clock domain.
//
// The active-high reset is applied asynchronously and released on the
// domain's own clock after two flops, so that every flop of the domain
// leaves reset at the same edge. This is this design's choice; the
// processor only specifies an active-high reset input.
// The second flop both is reset asynchronously and drives the asynchronous
// resets of the domain; lint tools note that mix, and it is the intended
// structure of a reset synchronizer.
module reset_sync (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);

  logic [1:0] pipe;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) pipe <= 2'b11;
    else        pipe <= {pipe[0], 1'b0};
  end

  assign rst_out = pipe[1];

endmodule
