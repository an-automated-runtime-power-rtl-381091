// tb_pg_top_unmerged: end-to-end testbench of the power-gated example circuit
// built with the separate latch + flip-flop capture stage (MERGED_FF = 0).
//
// The reference is the same circuit with clock gating only: launch registers
// that load when the enable was high before a rising edge, the function
// E = ~(q1 & ~q2 & q3) always evaluated, and a capture register loading E on
// every edge. The power-gated design must produce the same q after every
// edge. Two phases:
//   1. the waveform of the scheme's example: in = 1,0,1, the enable dropped
//      so that the gated clock misses two edges (T2, T3) and returns at T4;
//   2. random inputs and random enable runs, with late enable toggles one
//      time unit before the edge.
// Mechanisms counted (each must occur): gated-clock pulses suppressed, sleep
// entries (Activation falls), wake-ups (Activation rises), node E pulled up
// while asleep, node C pulled up while asleep, edges where q came from the
// held value while Activation was low, the first edge after the enable rises
// (still asleep), and late enable toggles.
module tb_pg_top_unmerged;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en_clk = 1'b1;
  logic in_1 = 1'b0, in_2 = 1'b0, in_3 = 1'b0;
  logic q, gclk, activation, node_c, node_e;

  int checks = 0, failures = 0;
  int n_gated = 0, n_sleep = 0, n_wake = 0, n_e_pulled = 0, n_c_pulled = 0;
  int n_held_edges = 0, n_first_edge = 0, n_late = 0, n_pulses = 0;

  // reference state
  logic [2:0] r_q;
  logic       r_out;
  logic       prev_act;
  logic       prev_en;

  pg_top #(.MERGED_FF(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .en_clk(en_clk),
    .in_1(in_1), .in_2(in_2), .in_3(in_3),
    .q(q), .gclk(gclk), .activation(activation),
    .node_c(node_c), .node_e(node_e)
  );

  always #5 clk = ~clk;

  function automatic logic f_e(input logic [2:0] v);   // v = {q1,q2,q3}
    return ~(v[2] & ~v[1] & v[0]);
  endfunction

  function automatic logic f_c(input logic [2:0] v);
    return ~(v[2] & ~v[1]);
  endfunction

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %0b want %0b", what, $time, got, want);
    end
  endtask

  // one clock cycle: en for the next edge (possibly toggled late), inputs
  task automatic cycle(input logic en_early, input logic en_final,
                       input logic [2:0] din);
    @(negedge clk);
    {in_1, in_2, in_3} = din;
    en_clk = en_early;
    #4 en_clk = en_final;                 // 1 time unit before the edge
    if (en_final != en_early) n_late++;
    @(posedge clk);
    // reference update with pre-edge values
    r_out = f_e(r_q);
    if (en_clk) r_q = {in_1, in_2, in_3};
    if (en_clk && !prev_en) n_first_edge += (activation == 1'b0) ? 1 : 0;
    if (!activation) n_held_edges++;
    prev_en = en_clk;
    #1;
    check(q, r_out, "q vs clock-gated reference");
    check(activation, en_clk, "activation");
    check(gclk, en_clk, "gated clock");
    if (en_clk) n_pulses++; else n_gated++;
    if (prev_act && !activation) n_sleep++;
    if (!prev_act && activation) n_wake++;
    prev_act = activation;
    #1;
    if (activation) begin
      check(node_e, f_e(r_q), "node E while powered");
    end else begin
      check(node_e, 1'b1, "node E pulled up while asleep");
      check(node_c, 1'b1, "node C pulled up while asleep");
      if (f_e(r_q) == 1'b0) n_e_pulled++;
      if (f_c(r_q) == 1'b0) n_c_pulled++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_q = 3'b000;
    prev_act = 1'b1;
    prev_en = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    r_out = f_e(r_q);

    // phase 1: the example waveform, in = 1,0,1
    cycle(1'b1, 1'b1, 3'b101);   // T1: launch
    cycle(1'b1, 1'b1, 3'b101);
    cycle(1'b0, 1'b0, 3'b101);   // T2: gated
    cycle(1'b0, 1'b0, 3'b101);   // T3: gated
    cycle(1'b0, 1'b1, 3'b101);   // T4: enable rises late, launch again
    cycle(1'b1, 1'b1, 3'b101);   // T5

    // phase 2: random traffic with enable runs
    for (int run = 0; run < 3000; run++) begin
      logic e;
      int   len;
      e   = 1'($urandom);
      len = 1 + ($urandom % 5);
      for (int k = 0; k < len; k++) begin
        logic early;
        early = ($urandom % 4 == 0) ? ~e : e;
        cycle(early, e, 3'($urandom));
      end
    end

    $display("pulses=%0d gated=%0d sleep=%0d wake=%0d e_pulled=%0d c_pulled=%0d held_edges=%0d first_edge=%0d late=%0d",
             n_pulses, n_gated, n_sleep, n_wake, n_e_pulled, n_c_pulled,
             n_held_edges, n_first_edge, n_late);
    if (n_gated == 0)      begin failures++; $display("no gated edge"); end
    if (n_sleep == 0)      begin failures++; $display("no sleep entry"); end
    if (n_wake == 0)       begin failures++; $display("no wake-up"); end
    if (n_e_pulled == 0)   begin failures++; $display("node E never disturbed"); end
    if (n_c_pulled == 0)   begin failures++; $display("node C never disturbed"); end
    if (n_held_edges == 0) begin failures++; $display("no held-value edge"); end
    if (n_first_edge == 0) begin failures++; $display("no asleep first edge"); end
    if (n_late == 0)       begin failures++; $display("no late toggle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
