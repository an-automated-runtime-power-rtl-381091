// latch_ff: flip-flop with a separate additional latch in front.
//
// The straightforward form of the capture stage: a front latch, transparent
// while en (Activation) is high, followed by an ordinary positive-edge
// master-slave flip-flop. While the power-gated logic sleeps, the front
// latch keeps the last valid input and the flip-flop keeps re-loading it.
// It costs a whole extra latch per flip-flop; pg_ff gives the same function
// by merging this latch into the master latch. Both are kept so that either
// can be selected in pg_top.
//
// Latch states (en, clk): front latch through when en is high; master
// through when clk is low; slave through when clk is high.
// Interface: clk clock, en Activation, d data, q output. No reset.
// Timing: q takes, at each rising edge of clk, the front latch's value, i.e.
// d if en was high, else the d held when en fell. en must change only while
// clk is high.
module latch_ff (
  input  logic clk,
  input  logic en,
  input  logic d,
  output logic q
);

  logic t, u;

  always_latch begin
    if (en) t = d;
  end

  always_latch begin
    if (!clk) u = t;
  end

  always_latch begin
    if (clk) q = u;
  end

endmodule
