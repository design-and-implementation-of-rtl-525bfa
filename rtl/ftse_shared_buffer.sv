// ftse_shared_buffer: the two shared FIFO buffers of an FTSE's routing logic.
//
// Cells that lose output contention (or that must queue behind older
// buffered cells) are kept in two FIFOs shared by both output ports, the
// upper and the lower buffer.  Together they behave as one ordered queue:
//  * writing fills the upper buffer first; when the buffer being written is
//    full, writing moves to the other buffer, but only if that one is empty,
//    and then stays there until it is full in turn;
//  * reading takes cells from the upper buffer first and, whichever buffer
//    is being read, keeps reading it until it is empty before moving on.
// Because writing only moves into an empty buffer and reading only leaves
// an empty one, cells leave in the order they came.  A cell that finds the
// buffer being written full while the other is still in use is lost
// (lost_o).
//
// Interface: up to PUSH_W writes (push_i[k].valid, in order) and POP_W reads
// per cycle.  peek_o[0..POP_W-1] show the oldest stored cells; pop_n_i of
// them are removed at the rising edge.  Pops take effect before pushes, so
// a cell pushed in the same cycle can use a freed place.
//
// Following the design: two shared FIFOs, upper first, keep-writing and
// keep-reading rules, cell loss when both are full.  Own choices: DEPTH (the
// document gives no buffer size), the number of reads and writes per cycle,
// and moving writing to the other buffer only when that one is empty.
module ftse_shared_buffer
  import atm_pkg::*;
#(
  parameter int unsigned DEPTH  = 4,
  parameter int unsigned PUSH_W = 4,
  parameter int unsigned POP_W  = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  rl_entry_t          push_i [PUSH_W],
  input  logic               push_valid_i [PUSH_W],
  input  logic [1:0]         pop_n_i,
  output rl_entry_t          peek_o [POP_W],
  output logic               peek_valid_o [POP_W],
  output logic [2:0]         lost_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o [2]   // [0] upper, [1] lower
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  rl_entry_t       mem [2][DEPTH];
  logic [PW-1:0]   rptr_q [2], wptr_q [2];
  logic [CW-1:0]   cnt_q  [2];
  logic            wsel_q, rsel_q;

  logic [PW-1:0]   rptr_d [2], wptr_d [2];
  logic [CW-1:0]   cnt_d  [2];
  logic            wsel_d, rsel_d;
  logic            wr_en  [PUSH_W];
  logic            wr_buf [PUSH_W];
  logic [PW-1:0]   wr_idx [PUSH_W];
  logic [2:0]      lost_d;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  // oldest cells
  always_comb begin
    logic o;
    o = ~rsel_q;
    for (int k = 0; k < int'(POP_W); k++) begin
      peek_o[k]       = '0;
      peek_valid_o[k] = 1'b0;
    end
    if (cnt_q[rsel_q] != 0) begin
      peek_o[0]       = mem[rsel_q][rptr_q[rsel_q]];
      peek_valid_o[0] = 1'b1;
      if (POP_W > 1) begin
        if (cnt_q[rsel_q] > 1) begin
          peek_o[POP_W-1]       = mem[rsel_q][inc(rptr_q[rsel_q])];
          peek_valid_o[POP_W-1] = 1'b1;
        end else if (wsel_q != rsel_q && cnt_q[o] != 0) begin
          peek_o[POP_W-1]       = mem[o][rptr_q[o]];
          peek_valid_o[POP_W-1] = 1'b1;
        end
      end
    end
  end

  // next state: pops one by one, then pushes one by one
  always_comb begin
    rptr_d = rptr_q;
    wptr_d = wptr_q;
    cnt_d  = cnt_q;
    wsel_d = wsel_q;
    rsel_d = rsel_q;
    lost_d = '0;
    for (int k = 0; k < int'(PUSH_W); k++) begin
      wr_en[k]  = 1'b0;
      wr_buf[k] = 1'b0;
      wr_idx[k] = '0;
    end
    for (int k = 0; k < int'(POP_W); k++) begin
      if (k < int'(pop_n_i) && cnt_d[rsel_d] != 0) begin
        rptr_d[rsel_d] = inc(rptr_d[rsel_d]);
        cnt_d[rsel_d]  = cnt_d[rsel_d] - 1'b1;
        if (cnt_d[rsel_d] == 0 && wsel_d != rsel_d) rsel_d = ~rsel_d;
      end
    end
    for (int k = 0; k < int'(PUSH_W); k++) begin
      if (push_valid_i[k]) begin
        if (int'(cnt_d[wsel_d]) == int'(DEPTH) && cnt_d[~wsel_d] == 0) begin
          wsel_d = ~wsel_d;
          if (cnt_d[rsel_d] == 0) rsel_d = wsel_d;
        end
        if (int'(cnt_d[wsel_d]) < int'(DEPTH)) begin
          wr_en[k]       = 1'b1;
          wr_buf[k]      = wsel_d;
          wr_idx[k]      = wptr_d[wsel_d];
          wptr_d[wsel_d] = inc(wptr_d[wsel_d]);
          cnt_d[wsel_d]  = cnt_d[wsel_d] + 1'b1;
        end else begin
          lost_d = lost_d + 3'd1;
        end
      end
    end
    // an empty queue restarts in the upper buffer
    if (cnt_d[0] == 0 && cnt_d[1] == 0) begin
      wsel_d = 1'b0;
      rsel_d = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        rptr_q[b] <= '0;
        wptr_q[b] <= '0;
        cnt_q[b]  <= '0;
      end
      wsel_q <= 1'b0;
      rsel_q <= 1'b0;
    end else begin
      rptr_q <= rptr_d;
      wptr_q <= wptr_d;
      cnt_q  <= cnt_d;
      wsel_q <= wsel_d;
      rsel_q <= rsel_d;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(PUSH_W); k++)
      if (wr_en[k]) mem[wr_buf[k]][wr_idx[k]] <= push_i[k];
  end

  assign lost_o  = lost_d;
  assign count_o = cnt_q;

endmodule
