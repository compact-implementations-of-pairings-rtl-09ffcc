// tb_clock_gate: checks the OR-type clock gate. The enable changes just after
// each rising clock edge. The gated clock must give a rising edge exactly at
// the clock edges that follow an enabled cycle, stay high for the whole of a
// disabled cycle, and never change while clk is high.
module tb_clock_gate;
  logic clk = 1'b1, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int edges = 0, expected = 0;

  clock_gate dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) if ($time > 0) edges++;

  // gclk may only move together with clk or, when enabled, fall with it
  always @(gclk) if (clk && $time > 0) begin
    checks++;
    if (!gclk) begin failures++; $display("FAIL gated clock low while clk high at %0t", $time); end
  end

  initial begin
    logic e;
    for (int n = 0; n < 300; n++) begin
      #1 e = ($urandom % 3) != 0;
      en = e;
      #4 clk = 1'b0;
      #1;
      checks++;
      if (gclk !== !e) begin failures++; $display("FAIL low phase: en=%b gclk=%b", e, gclk); end
      #4 clk = 1'b1;
      if (e) expected++;
      #0;
    end
    #1;
    checks++;
    if (edges != expected) begin
      failures++;
      $display("FAIL %0d gated edges, expected %0d", edges, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
