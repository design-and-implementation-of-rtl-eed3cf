// tb_clock_gate: checks the negative-edge flip-flop clock gate. The enable is
// changed just after each rising edge of the master clock at random; the
// gated clock must deliver exactly the rising edges whose preceding falling
// edge saw the enable high, follow the master clock high phase in full
// when enabled (no shortened pulse), and stay low while the master clock is
// low (no glitch).
module tb_clock_gate;
  logic clk = 0, rst_n = 1, en = 0, gclk;
  int   checks = 0, failures = 0;
  int   gedges = 0, exp_edges = 0;

  clock_gate dut (.clk, .rst_n, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // glitch check: whenever clk is low, gclk must be low
  always @(gclk) if (gclk && !clk) begin failures++; checks++; end

  initial begin
    logic cur;
    #1 rst_n = 0;   // falling edge: the asynchronous reset takes effect
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // reset state: clock off
    @(posedge clk); #1;
    checks++;
    if (gedges != 0) failures++;
    for (int i = 0; i < 400; i++) begin
      cur = 1'($urandom);
      en = cur;                       // set while clk is high, just after the edge
      #2 en = 1'($urandom);           // toggles before the falling edge are harmless
      #1 en = cur;
      @(posedge clk);
      if (cur) exp_edges++;
      #1;
      checks++;
      if (gclk !== cur) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: gclk=%0d exp %0d", i, gclk, cur);
      end
      // an enable change now (clk high) must not cut the pulse short
      en = ~cur;
      #3;
      checks++;
      if (gclk !== cur) failures++;
      en = cur;
    end
    @(posedge clk); #1;
    checks++;
    if (gedges != exp_edges) begin
      failures++;
      $display("FAIL edge count %0d exp %0d", gedges, exp_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
