// ftse_mux: output multiplexer (MUX_1 / MUX_2) of a 2x2 FTSE.
//
// Each output port has one MUX fed by the port's OC and spare OC.  It
// sends one cell per cycle out of the FTSE, always preferring the OC, which
// carries the higher-priority cell, and taking the spare OC's cell only
// when the OC is empty.  take_oc_o / take_soc_o tell the controllers which
// cell left.
//
// Purely combinational.  Following the design: OC first, then spare OC.
module ftse_mux
  import atm_pkg::*;
(
  input  cell_t oc_i,
  input  cell_t soc_i,
  output cell_t cell_o,
  output logic  take_oc_o,
  output logic  take_soc_o
);

  always_comb begin
    take_oc_o  = oc_i.valid;
    take_soc_o = !oc_i.valid && soc_i.valid;
    if (oc_i.valid)       cell_o = oc_i;
    else if (soc_i.valid) cell_o = soc_i;
    else                  cell_o = CELL_EMPTY;
  end

endmodule
