// pg_pkg: shared types of the runtime power-gating design.
//
// gate_e names the logic function of a multi-threshold cell (mt_cell). The
// two-input NAND is the cell drawn for the scheme; the inverter and NOR are
// this design's additions so that a small example cone can be built from the
// same kind of cell.
package pg_pkg;

  typedef enum logic [1:0] {
    GATE_INV   = 2'd0,
    GATE_NAND2 = 2'd1,
    GATE_NOR2  = 2'd2
  } gate_e;

endpackage
