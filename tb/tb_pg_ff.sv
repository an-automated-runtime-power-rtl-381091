// tb_pg_ff: self-checking testbench of the flip-flop with the additional
// latch function.
//
// The reference is the unmerged circuit the flip-flop replaces: a front latch
// transparent while en is high, followed by an ordinary positive-edge
// flip-flop. en is changed only just after rising edges, as Activation is.
// d changes at random points, including wildly while en is low (the
// power-gated logic being pulled up). After every edge q must equal the
// reference, and in the cycles where en is low q must keep the value d had
// at the edge where en fell. The four (en, clk) states of the truth table
// are counted and each must occur.
module tb_pg_ff;

  logic clk = 1'b0;
  logic en  = 1'b1;
  logic d   = 1'b0;
  logic q;
  logic t, ref_q;
  logic held;
  int   checks = 0, failures = 0;
  int   state_cnt [4];
  int   held_edges = 0;

  pg_ff dut (.clk(clk), .en(en), .d(d), .q(q));

  // reference: front latch + conventional flip-flop
  always_latch begin
    if (en) t = d;
  end
  always_ff @(posedge clk) ref_q <= t;

  always #5 clk = ~clk;

  // count truth-table states (en, clk) at every half cycle
  always @(clk) state_cnt[{~en, ~clk}]++;

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %0b want %0b", what, $time, got, want);
    end
  endtask

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    held = d;
    repeat (600) begin
      @(posedge clk);
      if (en) held = d;               // the value the flip-flop must now hold
      #1;
      check(q, ref_q, "q vs latch+FF reference");
      check(q, held, "q is d at the last edge with en high");
      if (!en) held_edges++;
      en = ($urandom % 3 != 0);       // Activation changes just after the edge
      // d wanders inside the cycle; it settles 2 time units before the edge
      #1 d = 1'($urandom);
      #3 d = 1'($urandom);
      #3 d = 1'($urandom);
    end
    for (int s = 0; s < 4; s++) if (state_cnt[s] == 0) begin
      failures++;
      $display("truth-table state %0d never reached", s + 1);
    end
    if (held_edges == 0) failures++;
    $display("held_edges=%0d", held_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
