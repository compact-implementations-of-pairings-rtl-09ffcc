// clock_gate: clock gating cell that parks the gated clock high when idle.
//
// The enable is captured by a latch that is transparent while clk is high and
// holds while clk is low; the gated clock is clk OR NOT(latched enable). When
// the enable is low the gated clock stays high, so a gated register sees no
// edges and its clock net does not toggle. When enabled, the gated clock
// follows clk and the register is written on the rising edge of clk.
// Interface: en is computed from state that changes at the rising edge of clk
// and must be stable before clk falls. The circuit is the document's choice
// (OR-type gate that keeps the clock high while idle); the latch is
// intentional and is the only one in the design.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (clk) en_l = en;
  end

  assign gclk = clk | ~en_l;
endmodule
