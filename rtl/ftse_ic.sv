// ftse_ic: input controller (IC) of a 2x2 FTSE, with its demultiplexer.
//
// Each FTSE inlet enters through an IC.  The IC latches the arriving cell
// and hands it to the selector one clock later.  In front of it sits a
// demultiplexer, taken to be reliable, which the spare IC controls: while
// the IC reports itself faulty (fault_i = 1) the demux steers the arriving
// cell to the spare IC instead (to_spare_o, combinational) and the IC
// itself delivers nothing.  The IC reports its state to BFS_CTRL
// (status_o).
//
// Timing: cell_i sampled at the rising edge, cell_o valid the cycle after.
// Following the design: the demux, the hand-over to the spare IC and the
// status report.  Own choices: one register stage, active-low synchronous
// reset, and that a faulty IC simply delivers no cells; a cell it held when
// it failed is lost (lost_o).
module ftse_ic
  import atm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fault_i,     // IC is faulty
  input  cell_t cell_i,      // cell arriving at the FTSE inlet
  output cell_t cell_o,      // cell towards the selector
  output cell_t to_spare_o,  // demux output towards the spare IC
  output logic  status_o,    // fault status towards BFS_CTRL
  output logic  lost_o       // a held cell was lost because the IC failed
);

  cell_t cell_q;

  always_comb begin
    to_spare_o = CELL_EMPTY;
    if (fault_i && cell_i.valid) to_spare_o = cell_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       cell_q <= CELL_EMPTY;
    else if (fault_i) cell_q <= CELL_EMPTY;
    else              cell_q <= cell_i;
  end

  assign cell_o   = cell_q;
  assign status_o = fault_i;
  assign lost_o   = fault_i && cell_q.valid;

endmodule
