// mt_cell: logic-level view of a multi-threshold (MT) cell.
//
// On silicon the cell is a low-Vt gate whose ground path goes through a
// high-Vt power switch, plus a pMOS that pulls the output up to VDD while
// the switch is off so that the next stage never sees a floating input. Its
// logic behaviour is what this module gives: while activation is high the
// output is the gate's function of its inputs; while it is low the output is
// 1. The switch transistor, its wake-up time and the leakage saving have no
// logic-level meaning and are not modelled; wake-up is taken to complete
// within the clock cycle in which activation rises, as the scheme requires.
//
// Parameter GATE selects the function (pg_pkg::gate_e). The two-input NAND is
// the cell the scheme shows; INV and NOR2 are this design's additions.
// Interface: a, b inputs (b unused by GATE_INV), activation power-switch
// control (1 = powered), y output. Purely combinational.
module mt_cell
  import pg_pkg::*;
#(
  parameter gate_e GATE = GATE_NAND2
) (
  input  logic a,
  input  logic b,
  input  logic activation,
  output logic y
);

  logic f;

  always_comb begin
    unique case (GATE)
      GATE_INV:   f = ~a;
      GATE_NAND2: f = ~(a & b);
      GATE_NOR2:  f = ~(a | b);
      default:    f = 1'b1;
    endcase
  end

  // pull-up pMOS wins while the power switch is off
  assign y = f | ~activation;

endmodule
