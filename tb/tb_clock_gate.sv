// tb_clock_gate: drives a random enable from the rising edge of the clock
// and checks that the gated clock has a rising edge exactly in the cycles
// whose enable was set before the edge, that it is never high while the
// clock is low, and that enable changes while the clock is high (the case a
// plain AND gate would turn into a glitch) do not reach the output.
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int   checks = 0, failures = 0;
  int   expected = 0, got = 0;
  bit   en_at_edge;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  always @(posedge gclk) got++;

  // gclk may only be high while clk is high.
  always @(gclk or clk) begin
    #0.01;
    checks++;
    if (gclk && !clk) begin
      failures++;
      $display("FAIL: gated clock high while clock low at %0t", $time);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      en_at_edge = en;
      if (en_at_edge) expected++;
      #1;
      en = 1'($urandom);
      // Glitch attempt: pulse the enable while the clock is high.
      if ($urandom_range(0, 3) == 0) begin
        #1 en = ~en;
        #1 en = ~en;
      end
    end
    @(posedge clk);
    if (en) expected++;
    #1;
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL: %0d gated edges, expected %0d", got, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
