// ftse_bfs_ctrl: backward fault signal controller of a 2x2 FTSE.
//
// BFS_CTRL works out whether the upper or the lower half of the FTSE can
// still carry cells and passes that backwards, towards the inlets, so that
// the routing-tag interface in front of the switch can pick the alternate
// path.  bfs_u_o is raised when the downstream FTSE's signal received on
// the upper output port is raised, or when IC_1 and the spare IC are both
// faulty, or when OC_1 and spare OC_1 are both faulty; bfs_l_o likewise for
// the lower half (IC_2, OC_2, spare OC_2 and the lower output port).
//
// Purely combinational.  Following the design: the fault conditions and the
// forwarding of a raised downstream signal.  Own choice: the downstream
// signal on each output port is the one the next FTSE raises for the inlet
// that port feeds.
module ftse_bfs_ctrl
  import atm_pkg::*;
(
  input  ftse_fault_t st_i,      // status reported by ICs, spare IC, OCs, spare OCs
  input  logic        bfs_u_i,   // from the next stage, upper output port
  input  logic        bfs_l_i,   // from the next stage, lower output port
  output logic        bfs_u_o,
  output logic        bfs_l_o
);

  always_comb begin
    bfs_u_o = bfs_u_i || (st_i.ic[0] && st_i.sic) || (st_i.oc[0] && st_i.soc[0]);
    bfs_l_o = bfs_l_i || (st_i.ic[1] && st_i.sic) || (st_i.oc[1] && st_i.soc[1]);
  end

endmodule
