// tb_pg_cg_cell: self-checking testbench of the clock-gating cell with
// Activation generation.
//
// The enable is driven as in tb_cg_cell (early, late and high-phase changes).
// Checked every cycle: the gated clock pulses exactly when the enable was high
// before the rising edge; Activation, through the following cycle, equals
// that same enable value, i.e. it is high precisely in the cycles that begin
// with a gated-clock pulse. During reset Activation must be 1.
module tb_pg_cg_cell;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic gclk, activation;
  int   checks = 0, failures = 0;
  int   sleeps = 0, wakes = 0;
  logic exp, prev_exp = 1'b1;

  pg_cg_cell dut (.clk(clk), .rst_n(rst_n), .en(en), .gclk(gclk),
                  .activation(activation));

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
    repeat (3) begin
      @(posedge clk);
      #1 check(activation, 1'b1, "activation during reset");
    end
    @(negedge clk) rst_n = 1'b1;
    repeat (400) begin
      @(negedge clk);
      #1 en = 1'($urandom);
      #3 en = ($urandom % 4 == 0) ? ~en : en;   // occasional late toggle
      @(posedge clk);
      exp = en;
      #1 check(gclk, exp, "gclk pulse");
      check(activation, exp, "activation after edge");
      en = 1'($urandom);
      #6 check(activation, exp, "activation held through cycle");
      if (prev_exp && !exp) sleeps++;
      if (!prev_exp && exp) wakes++;
      prev_exp = exp;
    end
    if (sleeps == 0 || wakes == 0) failures++;
    $display("sleeps=%0d wakes=%0d", sleeps, wakes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
