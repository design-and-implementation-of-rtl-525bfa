// ftse: 2x2 Fault Tolerant Switching Element.
//
// The FTSE is the building block of the fault tolerant switch.  Cells enter
// through two input controllers (IC_1, IC_2), each with a demultiplexer to
// a shared spare IC; a 3x2 selector picks the two live sources; the routing
// logic with its two shared FIFO buffers switches cells by one routing bit
// to the output controllers; each output port has an OC and a spare OC and
// a multiplexer that prefers the OC.  BFS_CTRL collects the fault status of
// all controllers and passes a backward fault signal per half towards the
// inlets.  Every IC/OC pair is thus joined by four paths (IC or spare IC,
// times OC or spare OC).
//
// Datapath:  in_i -> IC / spare IC (register) -> selector -> routing logic
// -> OC / spare OC (register) -> MUX -> out_i.  A cell crosses the FTSE in
// two clock cycles when it neither waits in the buffers nor in a spare
// controller; the MUX output is combinational from the OC registers and is
// meant to feed the next FTSE's IC register.
//
// fault_i injects a fault into any of the seven controllers; a faulty
// controller passes no cells and reports its state to BFS_CTRL.  lost_o
// counts cells lost this cycle (held by an input controller when it fails,
// spare IC overflow, full shared buffers, or an output port with both OCs
// faulty); the ev_* outputs mark routing-logic
// events.  Following the design: the set of units and how they connect.
// Own choices: cell-parallel transfer of whole cells, the register placement
// and the loss accounting.
module ftse
  import atm_pkg::*;
#(
  parameter int unsigned NS    = 3,
  parameter int unsigned STAGE = 0,
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ftse_fault_t fault_i,
  input  cell_t       in_i  [2],
  output cell_t       out_o [2],
  input  logic        bfs_u_i,
  input  logic        bfs_l_i,
  output logic        bfs_u_o,
  output logic        bfs_l_o,
  output logic [3:0]  lost_o,
  output logic        ev_contention_o,
  output logic        ev_buffered_o,
  output logic        ev_from_buffer_o,
  output logic        ev_replicate_o,
  output logic        ev_spare_ic_o,     // the spare IC delivered a cell
  output logic        ev_spare_oc_o,     // a spare OC delivered a cell
  output logic        ev_lower_buf_o,    // the lower shared buffer holds cells
  output logic [$clog2(2*DEPTH+1)-1:0] buf_level_o
);

  cell_t       ic_cell [2];
  cell_t       ic_to_spare [2];
  cell_t       sic_cell;
  cell_t       sel_cell [2];
  logic [2:0]  sic_lost;
  logic [1:0]  ic_lost;
  logic [2:0]  rl_lost;
  ftse_fault_t st;

  logic [1:0]  oc_load, soc_load, oc_free, soc_free, take_oc, take_soc;
  cell_t       oc_d [2], soc_d [2], oc_q [2], soc_q [2];

  for (genvar i = 0; i < 2; i++) begin : g_ic
    ftse_ic u_ic (
      .clk, .rst_n, .fault_i(fault_i.ic[i]), .cell_i(in_i[i]),
      .cell_o(ic_cell[i]), .to_spare_o(ic_to_spare[i]), .status_o(st.ic[i]),
      .lost_o(ic_lost[i])
    );
  end

  ftse_spare_ic u_sic (
    .clk, .rst_n, .fault_i(fault_i.sic), .a_i(ic_to_spare[0]), .b_i(ic_to_spare[1]),
    .cell_o(sic_cell), .status_o(st.sic), .lost_o(sic_lost)
  );

  ftse_selector u_sel (
    .ic1_fault_i(st.ic[0]), .ic2_fault_i(st.ic[1]), .sic_fault_i(st.sic),
    .ic1_i(ic_cell[0]), .sic_i(sic_cell), .ic2_i(ic_cell[1]), .sel_o(sel_cell)
  );

  ftse_routing_logic #(.NS(NS), .STAGE(STAGE), .DEPTH(DEPTH)) u_rl (
    .clk, .rst_n, .in_i(sel_cell),
    .oc_fault_i(st.oc), .soc_fault_i(st.soc), .oc_free_i(oc_free), .soc_free_i(soc_free),
    .oc_load_o(oc_load), .oc_cell_o(oc_d), .soc_load_o(soc_load), .soc_cell_o(soc_d),
    .lost_o(rl_lost), .ev_contention_o, .ev_buffered_o, .ev_from_buffer_o, .ev_replicate_o,
    .ev_lower_buf_o, .buf_level_o
  );

  for (genvar p = 0; p < 2; p++) begin : g_out
    ftse_oc u_oc (
      .clk, .rst_n, .fault_i(fault_i.oc[p]), .load_i(oc_load[p]), .cell_i(oc_d[p]),
      .take_i(take_oc[p]), .cell_o(oc_q[p]), .free_o(oc_free[p]), .status_o(st.oc[p])
    );
    ftse_oc u_soc (
      .clk, .rst_n, .fault_i(fault_i.soc[p]), .load_i(soc_load[p]), .cell_i(soc_d[p]),
      .take_i(take_soc[p]), .cell_o(soc_q[p]), .free_o(soc_free[p]), .status_o(st.soc[p])
    );
    ftse_mux u_mux (
      .oc_i(oc_q[p]), .soc_i(soc_q[p]), .cell_o(out_o[p]),
      .take_oc_o(take_oc[p]), .take_soc_o(take_soc[p])
    );
  end

  ftse_bfs_ctrl u_bfs (
    .st_i(st), .bfs_u_i, .bfs_l_i, .bfs_u_o, .bfs_l_o
  );

  assign lost_o        = 4'(sic_lost) + 4'(rl_lost) + 4'(ic_lost[0]) + 4'(ic_lost[1]);
  assign ev_spare_ic_o = sic_cell.valid;
  assign ev_spare_oc_o = |take_soc;

endmodule
