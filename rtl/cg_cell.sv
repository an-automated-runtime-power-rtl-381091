// cg_cell: conventional latch-based clock-gating cell.
//
// The enable is passed through a latch that is transparent while the system
// clock is low and holds while it is high; the held value is ANDed with the
// clock. A late change of the enable just before a rising edge is therefore
// still honoured at that edge, and a change while the clock is high cannot
// chop a clock pulse. This is the standard cell the scheme starts from.
//
// Interface: clk is the free-running system clock, en the clock-gating
// control (EnCLK), gclk the gated clock (CLK1). en_latched is the latch
// output, brought out for observation.
// Timing: gclk pulses high in the same cycle as clk whenever en was high at
// the rising edge of clk; no cycle of latency.
module cg_cell (
  input  logic clk,
  input  logic en,
  output logic en_latched,
  output logic gclk
);

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
