// ftse_spare_ic: spare input controller of a 2x2 FTSE.
//
// The spare IC stands in for IC_1 or IC_2 when either is faulty: the
// demultiplexer of a faulty IC passes that inlet's cells to it (a_i from
// IC_1, b_i from IC_2).  It can accept two cells in one cycle but hands only
// one per cycle to the selector, so it holds a buffer of one cell.  When
// both ICs are broken the higher-priority cell goes on to the selector and
// the lower-priority one waits in the buffer.
//
// Each cycle the candidates are the buffered cell and the two arriving
// cells.  The one with the highest priority is registered for output (on
// equal priority: buffered cell, then a_i, then b_i, which keeps arrival
// order); the next one is kept in the buffer; a third cell cannot be held
// and is dropped (lost_o pulses).  A faulty spare IC (fault_i) holds and
// delivers nothing: it drops what reaches it and what it held.
//
// Timing: one register stage, like the normal IC.  Following the design:
// the one-cell buffer and the high-priority-first rule.  Own choices: the
// tie-break order and dropping the third cell.
module ftse_spare_ic
  import atm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fault_i,
  input  cell_t      a_i,      // from the demux of IC_1
  input  cell_t      b_i,      // from the demux of IC_2
  output cell_t      cell_o,   // towards the selector
  output logic       status_o, // fault status towards BFS_CTRL
  output logic [2:0] lost_o    // cells dropped this cycle
);

  cell_t out_q, buf_q;
  cell_t out_d, buf_d;
  logic [2:0] lost_d;

  always_comb begin
    cell_t c [3];
    int unsigned first, second;
    int unsigned nvalid;
    c[0] = buf_q;
    c[1] = a_i;
    c[2] = b_i;
    out_d  = CELL_EMPTY;
    buf_d  = CELL_EMPTY;
    lost_d = 3'd0;
    nvalid = 0;
    first  = 3;
    second = 3;
    for (int k = 0; k < 3; k++) if (c[k].valid) nvalid++;
    if (fault_i) begin
      lost_d = 3'(int'(a_i.valid) + int'(b_i.valid) + int'(out_q.valid) + int'(buf_q.valid));
    end else begin
      // pick the best candidate: high priority first, then oldest
      first = 3;
      for (int k = 0; k < 3; k++)
        if (c[k].valid && (first == 3 || (c[k].prio && !c[first].prio))) first = k;
      second = 3;
      for (int k = 0; k < 3; k++)
        if (c[k].valid && k != first &&
            (second == 3 || (c[k].prio && !c[second].prio))) second = k;
      if (first  < 3) out_d = c[first];
      if (second < 3) buf_d = c[second];
      if (nvalid == 3) lost_d = 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_q <= CELL_EMPTY;
      buf_q <= CELL_EMPTY;
    end else begin
      out_q <= out_d;
      buf_q <= buf_d;
    end
  end

  assign cell_o   = out_q;
  assign status_o = fault_i;
  assign lost_o   = lost_d;

endmodule
