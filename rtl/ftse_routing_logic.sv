// ftse_routing_logic: self-routing core of a 2x2 FTSE, with its two shared
// buffers.
//
// The routing logic receives up to two cells per cycle from the selector
// and delivers cells to OC_1 / spare OC_1 (upper output port) and OC_2 /
// spare OC_2 (lower output port).  The port is chosen by routing bit
// NS-1-STAGE of the cell's tag (0 = upper, 1 = lower); a broadcast cell is
// copied to both ports in every stage but the first; a multicast cell goes
// to each port that one of its destination addresses selects, and each copy
// keeps only the addresses behind its port.
//
// Each cycle (the operating algorithm of the routing logic):
//  1. If the shared buffers hold cells, the oldest buffered cells are served
//     first and the arriving cells are stored behind them; otherwise the
//     arriving cells are served.  At most two cells are served per cycle.
//  2. A port asked for by one served cell gets it through its OC, or through
//     the spare OC if the OC is faulty.
//  3. Contention (both served cells want the same port): the higher-priority
//     cell takes the OC and the lower-priority one the spare OC.  When only
//     one of them is usable (a fault, or the spare OC still holds a cell),
//     the lower-priority cell is stored in the shared buffers instead.
//  4. A port whose OC and spare OC are both faulty cannot be reached: cells
//     for it are dropped (BFS_CTRL reports this state upstream).
// Cells that find the buffers full are lost.
//
// Timing: combinational from the selector and the buffer heads to the OC
// load strobes; buffer state changes at the rising edge.  Following the
// design: buffer-first service, priority resolution to OC / spare OC,
// buffering of contention losers under faults, replication for broadcast
// and multicast.  Own choices: two cells served per cycle, equal priority
// resolved by age, pushing a contention loser behind the arriving cells, and
// dropping cells for an unreachable port.
module ftse_routing_logic
  import atm_pkg::*;
#(
  parameter int unsigned NS    = 3,   // stages in the network
  parameter int unsigned STAGE = 0,   // stage of this FTSE
  parameter int unsigned DEPTH = 4    // cells per shared buffer
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cell_t      in_i [2],        // from the selector
  input  logic [1:0] oc_fault_i,
  input  logic [1:0] soc_fault_i,
  input  logic [1:0] oc_free_i,       // OC can take a cell this cycle
  input  logic [1:0] soc_free_i,      // spare OC can take a cell this cycle
  output logic [1:0] oc_load_o,
  output cell_t      oc_cell_o [2],
  output logic [1:0] soc_load_o,
  output cell_t      soc_cell_o [2],
  output logic [2:0] lost_o,          // cells lost this cycle
  output logic       ev_contention_o, // two served cells wanted one port
  output logic       ev_buffered_o,   // a cell was written to the buffers
  output logic       ev_from_buffer_o,// a buffered cell was served
  output logic       ev_replicate_o,  // a cell was copied to both ports
  output logic       ev_lower_buf_o,  // the lower shared buffer holds cells
  output logic [$clog2(2*DEPTH+1)-1:0] buf_level_o  // cells in both buffers
);

  localparam int unsigned BITPOS = NS - 1 - STAGE;
  localparam logic        FIRST  = (STAGE == 0);

  rl_entry_t  peek [2];
  logic       peek_valid [2];
  rl_entry_t  push [4];
  logic       push_valid [4];
  logic [1:0] pop_n;
  logic [2:0] buf_lost;
  logic [2:0] drop_lost;
  logic [$clog2(DEPTH+1)-1:0] buf_count [2];

  ftse_shared_buffer #(.DEPTH(DEPTH), .PUSH_W(4), .POP_W(2)) u_buf (
    .clk, .rst_n,
    .push_i(push), .push_valid_i(push_valid), .pop_n_i(pop_n),
    .peek_o(peek), .peek_valid_o(peek_valid), .lost_o(buf_lost),
    .count_o(buf_count)
  );

  always_comb begin
    rl_entry_t   seq [4];
    logic        seqv [4];
    rl_entry_t   srv [2];
    logic        srvv [2];
    int unsigned nsrv;
    logic [1:0]  rem [2];
    logic        first;

    seq[0] = peek[0];
    seqv[0] = peek_valid[0];
    seq[1] = peek[1];
    seqv[1] = peek_valid[1];
    for (int i = 0; i < 2; i++) begin
      seq[2+i].c = in_i[i];
      seq[2+i].want = want_ports(in_i[i], BITPOS, FIRST);
      seqv[2+i]     = in_i[i].valid && (seq[2+i].want != 2'b00);
    end

    // 1. serve the two oldest cells
    srv[0] = '0; srv[1] = '0;
    srvv[0] = 1'b0; srvv[1] = 1'b0;
    nsrv = 0;
    pop_n = 2'd0;
    for (int k = 0; k < 4; k++) begin
      if (seqv[k] && nsrv < 2) begin
        srv[nsrv]  = seq[k];
        srvv[nsrv] = 1'b1;
        nsrv++;
        if (k < 2) pop_n = pop_n + 2'd1;
        seqv[k] = 1'b0;   // consumed
      end
    end

    // 2.-4. give each port to its requesters
    oc_load_o  = 2'b00;
    soc_load_o = 2'b00;
    oc_cell_o[0] = CELL_EMPTY; oc_cell_o[1] = CELL_EMPTY;
    soc_cell_o[0] = CELL_EMPTY; soc_cell_o[1] = CELL_EMPTY;
    rem[0] = srvv[0] ? srv[0].want : 2'b00;
    rem[1] = srvv[1] ? srv[1].want : 2'b00;
    drop_lost = '0;
    ev_contention_o = 1'b0;
    for (int p = 0; p < 2; p++) begin
      logic r0, r1, oc_ok, soc_ok;
      logic a, b;
      first = 1'b1;
      a = 1'b0;
      b = 1'b1;
      r0 = rem[0][p];
      r1 = rem[1][p];
      oc_ok  = oc_free_i[p]  && !oc_fault_i[p];
      soc_ok = soc_free_i[p] && !soc_fault_i[p];
      if (oc_fault_i[p] && soc_fault_i[p]) begin
        drop_lost = drop_lost + 3'(int'(r0) + int'(r1));
        rem[0][p] = 1'b0;
        rem[1][p] = 1'b0;
      end else if (r0 || r1) begin
        if (r0 && r1) ev_contention_o = 1'b1;
        // a = cell served first on this port, b = the other one (if any)
        first = r0 && !(r1 && srv[1].c.prio && !srv[0].c.prio);
        a = !first;
        b = first;
        if (oc_ok) begin
          oc_load_o[p] = 1'b1;
          oc_cell_o[p] = copy_for_port(srv[a].c, BITPOS, p[0]);
          rem[a][p]    = 1'b0;
          if (r0 && r1 && soc_ok) begin
            soc_load_o[p] = 1'b1;
            soc_cell_o[p] = copy_for_port(srv[b].c, BITPOS, p[0]);
            rem[b][p]     = 1'b0;
          end
        end else if (soc_ok) begin
          soc_load_o[p] = 1'b1;
          soc_cell_o[p] = copy_for_port(srv[a].c, BITPOS, p[0]);
          rem[a][p]     = 1'b0;
        end
      end
    end

    // store what is left: unfinished served cells, then unserved arrivals
    for (int k = 0; k < 4; k++) begin
      push[k] = '0;
      push_valid[k] = 1'b0;
    end
    for (int i = 0; i < 2; i++) begin
      push[i].c  = srv[i].c;
      push[i].want  = rem[i];
      push_valid[i] = srvv[i] && (rem[i] != 2'b00);
    end
    for (int i = 0; i < 2; i++) begin
      push[2+i]       = seq[2+i];
      push_valid[2+i] = seqv[2+i];
    end

    ev_buffered_o    = push_valid[0] || push_valid[1] || push_valid[2] || push_valid[3];
    ev_from_buffer_o = (pop_n != 2'd0);
    ev_replicate_o   = (srvv[0] && srv[0].want == 2'b11) || (srvv[1] && srv[1].want == 2'b11);
  end

  // a controller is only loaded when it has room and works
  a_oc_load:  assert property (@(posedge clk) disable iff (!rst_n)
                               (oc_load_o & ~(oc_free_i & ~oc_fault_i)) == 2'b00);
  a_soc_load: assert property (@(posedge clk) disable iff (!rst_n)
                               (soc_load_o & ~(soc_free_i & ~soc_fault_i)) == 2'b00);

  assign lost_o         = buf_lost + drop_lost;
  assign ev_lower_buf_o = (buf_count[1] != 0);
  assign buf_level_o    = $bits(buf_level_o)'(buf_count[0]) + $bits(buf_level_o)'(buf_count[1]);

endmodule
