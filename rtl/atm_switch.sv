// atm_switch: N x N fault tolerant ATM switch built from 2x2 FTSEs.
//
// The network is a Baseline network with one extra stage placed in front
// of it: NS = log2(N) + 1 stages of N/2 FTSEs each.  Every inlet/outlet pair
// is joined by two disjoint paths.  The routing tag is the outlet number with
// one bit put in front of it: with that bit at 0 the cell takes the normal
// path, at 1 the alternate path; stage s switches on bit s of the extended
// tag (most significant first, 0 = upper port).  Inside each FTSE a spare IC
// and two spare OCs add four paths per IC/OC pair, so the switch tolerates
// faults at two levels.
//
// Wiring: output link j = 2 x FTSE + port of stage s feeds input link
// atm_pkg::next_link(s, j, n) of stage s+1, i.e. after stage 0 and stage 1
// the links are unshuffled across the whole switch, after stage s > 1
// within blocks of N >> (s-1) links, as in the Baseline network.  Backward
// fault signals run the same links in reverse: each FTSE port receives the
// signal that the next FTSE raises for the inlet it feeds, and a
// tag_interface per inlet sets the path bit from the upper signal of its
// first-stage FTSE (or from force_alt_i).
//
// Timing: without waiting a cell needs 2 clock cycles per stage; a cell
// presented at in_cell_i before rising edge t appears at out_cell_o right
// after edge t + 2*NS - 1.  lost_o counts cells lost since reset; the ev_*
// outputs show, per FTSE (index stage*N/2 + row), what happened this cycle.
// Following the design: topology, extra first stage, path bit, BFS chain.
// Own choices: the parameter limits (N a power of two from 2 to 1024, set
// by atm_pkg::ADDR_W) and the observation outputs.
module atm_switch
  import atm_pkg::*;
#(
  parameter int unsigned N     = 4,   // ports
  parameter int unsigned DEPTH = 4,   // cells per shared buffer
  localparam int unsigned n    = $clog2(N),
  localparam int unsigned NS   = n + 1,
  localparam int unsigned H    = N / 2,
  localparam int unsigned NF   = NS * H
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cell_t       in_cell_i   [N],     // tag / addresses: n-bit outlet numbers
  input  logic        force_alt_i [N],     // send this inlet's cells on the alternate path
  input  ftse_fault_t fault_i     [NS][H], // injected faults, [stage][row]
  output cell_t       out_cell_o  [N],
  output logic        bfs_port_o  [N],     // backward fault signal seen by each inlet
  output logic [31:0] lost_o,
  output logic [NF-1:0] ev_contention_o,
  output logic [NF-1:0] ev_buffered_o,
  output logic [NF-1:0] ev_from_buffer_o,
  output logic [NF-1:0] ev_replicate_o,
  output logic [NF-1:0] ev_spare_ic_o,
  output logic [NF-1:0] ev_spare_oc_o,
  output logic [NF-1:0] ev_lower_buf_o,
  output logic [$clog2(NF*2*DEPTH+1)-1:0] buf_cells_o  // cells in all shared buffers
);

  cell_t      link_in  [NS][N];   // input links of each stage
  cell_t      link_out [NS][N];   // output links of each stage
  logic [3:0] lost     [NS][H];
  logic [$clog2(2*DEPTH+1)-1:0] level [NS][H];

  if (N < 2 || (N & (N - 1)) != 0 || NS > ADDR_W) begin : g_bad_size
    $error("atm_switch: N must be a power of two from 2 to %0d", 1 << (ADDR_W - 1));
  end

  // inlets: routing-tag interfaces
  for (genvar i = 0; i < N; i++) begin : g_if
    tag_interface #(.NS(NS)) u_if (
      .cell_i(in_cell_i[i]), .bfs_i(g_stage[0].bfs_out[2*(i/2)]), .force_alt_i(force_alt_i[i]),
      .cell_o(link_in[0][i])
    );
    assign bfs_port_o[i] = g_stage[0].bfs_out[2*(i/2)];
  end

  for (genvar s = 0; s < NS; s++) begin : g_stage
    logic bfs_out  [N];   // BFS raised by this stage, per input link
    logic bfs_back [N];   // BFS received by this stage, per output link
    for (genvar k = 0; k < H; k++) begin : g_row
      cell_t fin [2], fout [2];
      assign fin[0] = link_in[s][2*k];
      assign fin[1] = link_in[s][2*k+1];
      assign link_out[s][2*k]   = fout[0];
      assign link_out[s][2*k+1] = fout[1];
      ftse #(.NS(NS), .STAGE(s), .DEPTH(DEPTH)) u_ftse (
        .clk, .rst_n, .fault_i(fault_i[s][k]),
        .in_i(fin), .out_o(fout),
        .bfs_u_i(bfs_back[2*k]), .bfs_l_i(bfs_back[2*k+1]),
        .bfs_u_o(bfs_out[2*k]),  .bfs_l_o(bfs_out[2*k+1]),
        .lost_o(lost[s][k]),
        .ev_contention_o(ev_contention_o[s*H+k]),
        .ev_buffered_o(ev_buffered_o[s*H+k]),
        .ev_from_buffer_o(ev_from_buffer_o[s*H+k]),
        .ev_replicate_o(ev_replicate_o[s*H+k]),
        .ev_spare_ic_o(ev_spare_ic_o[s*H+k]),
        .ev_spare_oc_o(ev_spare_oc_o[s*H+k]),
        .ev_lower_buf_o(ev_lower_buf_o[s*H+k]),
        .buf_level_o(level[s][k])
      );
    end
    // links to the next stage, BFS back from it
    for (genvar j = 0; j < N; j++) begin : g_link
      if (s < NS - 1) begin : g_mid
        assign link_in[s+1][next_link(s, j, n)] = link_out[s][j];
        assign bfs_back[j] = g_stage[s+1].bfs_out[next_link(s, j, n)];
      end else begin : g_last
        assign out_cell_o[j]  = link_out[s][j];
        assign bfs_back[j] = 1'b0;
      end
    end
  end

  always_comb begin
    buf_cells_o = '0;
    for (int s = 0; s < int'(NS); s++)
      for (int k = 0; k < int'(H); k++) buf_cells_o = buf_cells_o + $bits(buf_cells_o)'(level[s][k]);
  end

  // cell loss counter
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lost_o <= '0;
    end else begin
      logic [31:0] sum;
      sum = lost_o;
      for (int s = 0; s < int'(NS); s++)
        for (int k = 0; k < int'(H); k++) sum = sum + 32'(lost[s][k]);
      lost_o <= sum;
    end
  end

endmodule
