// tb_hs_channel: one request/acknowledge channel, an hs_tx on a 7 ns clock
// feeding an hs_rx on an unrelated 11 ns clock. The sender offers random
// words with random gaps, the receiver takes them after random delays. The
// test checks that every word arrives once, in order and intact, that
// `ready` and `valid` follow the protocol, and that a word sent to an idle
// receiver is seen within the synchronizer latency (SYNC_STAGES+1 receiver
// cycles) and acknowledged back within SYNC_STAGES+1 sender cycles.
`timescale 1ns/1ps
module tb_hs_channel;
  localparam int W = 12;

  logic clk_a = 0, clk_b = 0, rst = 0;
  logic send = 0, ready, req, ack, valid, take = 0;
  logic [W-1:0] din = '0, dtx, drx;
  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  int n_rx = 0;

  always #3.5 clk_a = ~clk_a;
  always #5.5 clk_b = ~clk_b;

  hs_tx #(.W(W)) u_tx (.clk(clk_a), .rst(rst), .send(send), .din(din), .ready(ready),
                       .req(req), .dout(dtx), .ack(ack));
  hs_rx #(.W(W)) u_rx (.clk(clk_b), .rst(rst), .req(req), .din(dtx), .valid(valid),
                       .dout(drx), .take(take), .ack(ack));

  task automatic fail(string m);
    failures++;
    $display("FAIL: %s at %0t", m, $time);
  endtask

  // Receiver side.
  initial begin
    logic [W-1:0] e;
    @(negedge rst);
    forever begin
      @(negedge clk_b);
      if (valid && $urandom_range(0, 2) != 0) begin
        take = 1;
        checks++;
        if (sent.size() == 0) fail("word received that was never sent");
        else begin
          e = sent.pop_front();
          if (drx !== e) fail($sformatf("got %03h expected %03h", drx, e));
        end
        n_rx++;
        @(posedge clk_b);
        #0.1 take = 0;
        checks++;
        if (valid) fail("valid still high after take");
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    #1 rst = 1;
    #30 rst = 0;
    // Latency of one transfer into an idle receiver.
    @(negedge clk_a);
    din = 12'h5A5; send = 1;
    sent.push_back(12'h5A5);
    @(posedge clk_a);
    #0.1 send = 0;
    checks++;
    if (ready) fail("ready still high after send");
    t = 0;
    while (n_rx == 0 && t < 100) begin #1 t++; end
    checks++;
    if (t > (2 + 1) * 11 + 11 * 3) fail($sformatf("receiver took %0d ns", t));
    // The acknowledge must come back and free the sender within
    // SYNC_STAGES + 1 sender cycles of the receiver taking the word.
    t = 0;
    while (!ready && t < 200) begin #1 t++; end
    checks++;
    if (!ready || t > (2 + 1) * 7 + 11) fail($sformatf("sender freed after %0d ns", t));
    // Random traffic.
    for (int i = 0; i < 300; i++) begin
      @(negedge clk_a);
      while (!ready) @(negedge clk_a);
      repeat ($urandom_range(0, 3)) @(negedge clk_a);
      din = W'($urandom); send = 1;
      sent.push_back(din);
      @(posedge clk_a);
      #0.1 send = 0;
    end
    t = 0;
    while (sent.size() != 0 && t < 1000) begin #1 t++; end
    checks++;
    if (sent.size() != 0) fail("words left undelivered");
    checks++;
    if (n_rx != 301) fail($sformatf("%0d words received", n_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
