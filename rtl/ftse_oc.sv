// ftse_oc: output controller of a 2x2 FTSE; also used as the spare OC.
//
// An OC holds one cell that the routing logic has switched to its output
// port until the output multiplexer takes it.  Each output port has an OC
// and a spare OC: the spare OC receives the lower-priority cell when two
// cells contend for the port, and all cells of the port when the OC is
// faulty.  A faulty controller (fault_i) holds no cell and reports its
// state to BFS_CTRL (status_o).
//
// Interface: load_i writes cell_i at the rising edge; take_i (from the
// multiplexer) frees the register at the same edge; free_o tells the
// routing logic, combinationally, whether a cell loaded now has room.
// Following the design: one cell per controller, status report.  Own
// choice: the load/take handshake.
module ftse_oc
  import atm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fault_i,
  input  logic  load_i,
  input  cell_t cell_i,
  input  logic  take_i,
  output cell_t cell_o,
  output logic  free_o,
  output logic  status_o
);

  cell_t cell_q;

  always_ff @(posedge clk) begin
    if (!rst_n || fault_i) cell_q <= CELL_EMPTY;
    else if (load_i)       cell_q <= cell_i;
    else if (take_i)       cell_q <= CELL_EMPTY;
  end

  assign cell_o   = cell_q;
  assign free_o   = !fault_i && (!cell_q.valid || take_i);
  assign status_o = fault_i;

endmodule
