// tb_mt_cell: exhaustive check of the MT-cell logic view for each gate type.
//
// For every combination of the two inputs and the power-switch control, the
// output must be the gate's function while powered and 1 while asleep.
module tb_mt_cell;

  import pg_pkg::*;

  logic a, b, act;
  logic y_inv, y_nand, y_nor;
  int   checks = 0, failures = 0;

  mt_cell #(.GATE(GATE_INV))   u_inv  (.a(a), .b(b), .activation(act), .y(y_inv));
  mt_cell #(.GATE(GATE_NAND2)) u_nand (.a(a), .b(b), .activation(act), .y(y_nand));
  mt_cell #(.GATE(GATE_NOR2))  u_nor  (.a(a), .b(b), .activation(act), .y(y_nor));

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b act=%0b: got %0b want %0b", what, a, b, act, got, want);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected outputs indexed by {act, a, b}
    logic [7:0] want_inv, want_nand, want_nor;
    want_inv  = 8'b0011_1111;   // act=1: ~a ; act=0: 1
    want_nand = 8'b0111_1111;
    want_nor  = 8'b0001_1111;
    for (int i = 0; i < 8; i++) begin
      {act, a, b} = 3'(i);
      #1;
      check(y_inv,  want_inv[i],  "INV");
      check(y_nand, want_nand[i], "NAND2");
      check(y_nor,  want_nor[i],  "NOR2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
