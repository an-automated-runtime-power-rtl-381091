// pg_cg_cell: clock-gating cell that also generates the power-switch control.
//
// A conventional clock-gating cell (latch + AND) produces the gated clock.
// In addition, the latched clock-gating control is sampled by a flip-flop on the
// rising edge of the free-running clock; that flip-flop's output is
// Activation, which drives the power switches of the MT-cells. Activation is
// therefore high for exactly those clock cycles that began with a gated-clock
// pulse, i.e. the cycles in which the logic fed by the gated flip-flops has
// new inputs to evaluate. Because Activation changes only right after a
// rising clock edge, it never sits on a critical path, but it is one cycle
// behind the enable; the flip-flop with the additional latch (pg_ff) makes up
// for that.
//
// Interface: clk system clock, rst_n asynchronous active-low reset, en the
// clock-gating control (EnCLK), gclk gated clock (CLK1), activation the
// power-switch control (1 = powered).
// Timing: activation = en as sampled at the previous rising edge of clk.
// Reset value of activation is 1 (logic powered) - this design's choice, so
// that the capture flip-flops follow their inputs while reset is held.
module pg_cg_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gclk,
  output logic activation
);

  logic en_latched;

  cg_cell u_cg (
    .clk        (clk),
    .en         (en),
    .en_latched (en_latched),
    .gclk       (gclk)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) activation <= 1'b1;
    else        activation <= en_latched;
  end

endmodule
