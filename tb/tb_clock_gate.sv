// tb_clock_gate: drives the enable with a random pattern that changes just
// after each rising edge (as a controller output does) and, in a second
// phase, with glitches while clk is high. Checks that gclk has a rising edge
// exactly at the clock edges that end a cycle with en high, is low whenever
// clk is low, and never shows a glitch.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int edges = 0, expected = 0;
  logic en_sampled;

  clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) edges++;

  initial begin
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      en_sampled = en;
      if (en_sampled) expected++;
      #1;
      checks++;
      if (gclk !== en_sampled) begin failures++; $display("FAIL gclk at cycle %0d", i); end
      // new enable shortly after the edge; in the second half also toggle it
      // again while clk is still high
      en = 1'($urandom);
      if (i >= 200) begin #1 en = ~en; #1 en = ~en; end
      #1;
      checks++;
      if (gclk !== en_sampled) begin failures++; $display("FAIL gclk glitch at cycle %0d", i); end
      @(negedge clk);
      #0;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL gclk high with clk low"); end
    end
    @(negedge clk);
    checks++;
    if (edges != expected) begin failures++; $display("FAIL edges %0d vs %0d", edges, expected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
