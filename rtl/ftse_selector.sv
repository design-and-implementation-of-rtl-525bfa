// ftse_selector: 3x2 selector of a 2x2 FTSE.
//
// Three cell sources reach the selector (IC_1, the spare IC and IC_2) and
// two lines leave it towards the routing logic.  The fault status of the
// ICs decides which two are taken: upper line = IC_1, or the spare IC when
// IC_1 is faulty; lower line = IC_2, or the spare IC when IC_2 (and only
// IC_2) is faulty.  With both ICs faulty the spare IC feeds the upper line
// and the lower line carries no cell.
//
// Purely combinational.  Following the design: a 3-to-2 selection steered
// by the status of the ICs and the spare IC.  Own choice: the line the
// spare IC's cell takes when both ICs are faulty.
module ftse_selector
  import atm_pkg::*;
(
  input  logic  ic1_fault_i,
  input  logic  ic2_fault_i,
  input  logic  sic_fault_i,
  input  cell_t ic1_i,
  input  cell_t sic_i,
  input  cell_t ic2_i,
  output cell_t sel_o [2]   // [0] upper line, [1] lower line
);

  always_comb begin
    cell_t spare;
    spare = sic_fault_i ? CELL_EMPTY : sic_i;
    sel_o[0] = ic1_fault_i ? spare : ic1_i;
    if (!ic2_fault_i)     sel_o[1] = ic2_i;
    else if (ic1_fault_i) sel_o[1] = CELL_EMPTY;
    else                  sel_o[1] = spare;
  end

endmodule
