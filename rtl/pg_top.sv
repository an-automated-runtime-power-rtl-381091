// pg_top: runtime power-gated example circuit.
//
// A clock-gated circuit converted to a power-gated one without changing its
// cycle-by-cycle behaviour. Three launch flip-flops take in_1..in_3 on the
// gated clock CLK1. A small combinational cone computes node E from them and
// a capture flip-flop (pg_ff) registers E on the free-running clock. The
// cone is built from one high-Vt gate (g1, always powered) and three MT-cells
// (g2..g4) whose power switches are driven by Activation, the clock-gating
// control registered on the system clock (pg_cg_cell).
//
// In a cycle that did not start with a gated-clock pulse the launch
// flip-flops hold, Activation is low and g2..g4 sleep: their outputs are
// pulled to 1 (for in = 1,0,1 this disturbs nodes C and E). pg_ff has kept
// the last valid E in its master latch and keeps delivering it. When the
// enable rises again, the next edge pulses CLK1 and raises Activation; the
// logic powers up in that cycle and E is valid again by the following edge.
// Output q is thus identical, cycle for cycle, to the same circuit with
// clock gating only and no power gating.
//
// The scheme fixes the structure (launch flip-flops on CLK1, g1 high-Vt,
// g2-g4 MT-cells, extra latch before the capture flip-flop); the gate types
// and their wiring are this design's choice:
//   A = ~q2                (g1, high-Vt INV, always on)
//   C = ~(q1 & A)          (g2, MT NAND2)
//   D = ~C                 (g3, MT INV)
//   E = ~(D & q3)          (g4, MT NAND2)
// so that, clock-gated or not, q = E = ~(q1 & ~q2 & q3).
// Parameter MERGED_FF selects the capture stage: 1 (default) the compact
// flip-flop whose master latch doubles as the additional latch (pg_ff), 0 a
// separate latch in front of an ordinary flip-flop (latch_ff). Both behave
// the same; the first saves a latch.
// The reset (asynchronous, active low) clears the launch flip-flops and
// holds Activation high; it is this design's addition.
//
// Interface: clk, rst_n, en_clk (EnCLK, the clock-gating control), in_1..3
// data, q registered E; gclk, activation, node_c and node_e are brought out
// for observation.
// Timing: launch flip-flops load at a rising clk edge when en_clk was high
// before it; q shows E one edge later.
module pg_top #(
  parameter bit MERGED_FF = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en_clk,
  input  logic in_1,
  input  logic in_2,
  input  logic in_3,
  output logic q,
  output logic gclk,
  output logic activation,
  output logic node_c,
  output logic node_e
);

  import pg_pkg::*;

  logic q1, q2, q3;
  logic node_a, node_d;

  pg_cg_cell u_cg (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (en_clk),
    .gclk       (gclk),
    .activation (activation)
  );

  // launch flip-flops, conventional, on the gated clock
  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
      q3 <= 1'b0;
    end else begin
      q1 <= in_1;
      q2 <= in_2;
      q3 <= in_3;
    end
  end

  // g1: high-Vt cell, never power-gated
  assign node_a = ~q2;

  mt_cell #(.GATE(GATE_NAND2)) u_g2 (
    .a(q1), .b(node_a), .activation(activation), .y(node_c)
  );

  mt_cell #(.GATE(GATE_INV)) u_g3 (
    .a(node_c), .b(1'b0), .activation(activation), .y(node_d)
  );

  mt_cell #(.GATE(GATE_NAND2)) u_g4 (
    .a(node_d), .b(q3), .activation(activation), .y(node_e)
  );

  // capture flip-flop with the additional latch function, free-running clock
  if (MERGED_FF) begin : g_merged
    pg_ff u_ff (
      .clk (clk),
      .en  (activation),
      .d   (node_e),
      .q   (q)
    );
  end else begin : g_separate
    latch_ff u_ff (
      .clk (clk),
      .en  (activation),
      .d   (node_e),
      .q   (q)
    );
  end

endmodule
