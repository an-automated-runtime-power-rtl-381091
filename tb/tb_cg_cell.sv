// tb_cg_cell: self-checking testbench of the latch-based clock-gating cell.
//
// Each cycle the enable is changed three times: early in the low phase, one
// time unit before the rising edge (a late toggle) and during the high phase.
// The gated clock must pulse in that cycle exactly when the enable was high
// just before the rising edge, and a change during the high phase must not
// cut or create a pulse. The expected value is the enable sampled by the
// testbench at the edge.
module tb_cg_cell;

  logic clk = 1'b0;
  logic en  = 1'b0;
  logic en_latched, gclk;
  int   checks = 0, failures = 0;
  int   pulses = 0, late_rises = 0;
  logic exp;

  cg_cell dut (.clk(clk), .en(en), .en_latched(en_latched), .gclk(gclk));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s at %0t: got %0b want %0b", what, $time, got, want);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic early;
    repeat (400) begin
      @(negedge clk);
      #1 early = 1'($urandom);
      en = early;
      #1 check(gclk, 1'b0, "gclk low in low phase");
      #2 en = 1'($urandom);                 // late toggle, 1 before the edge
      if (en && !early) late_rises++;
      @(posedge clk);
      exp = en;
      #1 check(gclk, exp, "gclk pulse");
      check(en_latched, exp, "latched enable");
      en = 1'($urandom);                    // change while the clock is high
      #2 check(gclk, exp, "gclk unaffected by high-phase change");
      if (exp) pulses++;
    end
    if (pulses == 0 || late_rises == 0) failures++;
    $display("pulses=%0d late_rises=%0d", pulses, late_rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
