// pg_ff: flip-flop with an additional latch function.
//
// A positive-edge master-slave flip-flop whose master latch is transparent
// only while the clock is low AND en (Activation) is high; the slave latch is
// transparent while the clock is high. With en high it is an ordinary
// flip-flop. When en falls (always just after a rising clock edge) the master
// keeps the value it captured at that edge and ignores its input, which the
// power-gated logic in front of it may pull to 1 while asleep. Every rising
// edge while en is low re-delivers that kept value, so the first edge after
// wake-up needs no valid input: the logic gets a whole cycle to power up.
// This merges the separate front latch of a "latch + flip-flop" pair into the
// master latch, which is possible because en only changes while the clock is
// high; the result behaves exactly like that pair.
//
// Truth table (en, clk): (H,H) master hold / slave through; (H,L) master
// through / slave hold; (L,H) master hold / slave through; (L,L) both hold.
//
// Interface: clk clock, en Activation, d data, q output. No reset: the
// flip-flop loads d on the first edge with en high (the clock-gating cell
// holds Activation high during reset).
// Timing: q takes, at each rising edge of clk, the last d seen while clk was
// low and en was high. en must change only while clk is high.
module pg_ff (
  input  logic clk,
  input  logic en,
  input  logic d,
  output logic q
);

  logic master;

  always_latch begin
    if (!clk && en) master = d;
  end

  always_latch begin
    if (clk) q = master;
  end

endmodule
