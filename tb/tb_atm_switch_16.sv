// tb_atm_switch_16: the routing examples of a 16 x 16 switch (five stages
// of eight FTSEs) checked end to end.
//  * Unicast, inlet 6 to outlet 10: on the normal path (tag 0 1010) the
//    cell must enter stages 0..4 on input links 6, 3, 9, 8, 10; on the
//    alternate path (tag 1 1010) on links 6, 11, 13, 10, 11, which use
//    other FTSEs in stages 1 to 3 (the two paths are disjoint there).  Both
//    take 2 x 5 = 10 cycles.
//  * Broadcast from inlet 8: one copy at each of the 16 outlets, no copy
//    made in stage 0.
//  * Multicast from inlet 8 to outlets 4, 6, 9, 14 and 15: a copy at exactly
//    those outlets.
//  * Random unicast traffic at 20% load: every cell at its outlet, no loss.
module tb_atm_switch_16;
  import atm_pkg::*;
  localparam int N  = 16;
  localparam int NS = 5;
  localparam int H  = N / 2;
  localparam int NF = NS * H;

  logic clk = 0, rst_n = 0;
  cell_t in [N], out [N];
  logic force_alt [N];
  ftse_fault_t fault [NS][H];
  logic bfs [N];
  logic [31:0] lost;
  logic [$clog2(NF*8+1)-1:0] bufcells;
  logic [NF-1:0] evc, evb, evf, evr, evsi, evso, evlow;
  int checks = 0, failures = 0;

  atm_switch #(.N(N)) dut (
    .clk, .rst_n, .in_cell_i(in), .force_alt_i(force_alt), .fault_i(fault),
    .out_cell_o(out), .bfs_port_o(bfs), .lost_o(lost),
    .ev_contention_o(evc), .ev_buffered_o(evb), .ev_from_buffer_o(evf),
    .ev_replicate_o(evr), .ev_spare_ic_o(evsi), .ev_spare_oc_o(evso),
    .ev_lower_buf_o(evlow), .buf_cells_o(bufcells));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cell_t uc(int id, int dest);
    cell_t c = CELL_EMPTY;
    c.valid = 1'b1;
    c.tag = ADDR_W'(dest);
    c.payload[31:0] = id;
    return c;
  endfunction

  int exp_q [int];
  int n_stage0_copies;

  task automatic collect();
    #1;
    for (int o = 0; o < N; o++) if (out[o].valid) begin
      int key;
      key = int'(out[o].payload[31:0]) * 32 + o;
      check(exp_q.exists(key), $sformatf("cell %0d expected at outlet %0d", out[o].payload[31:0], o));
      if (exp_q.exists(key)) exp_q.delete(key);
    end
    for (int k = 0; k < H; k++) if (evr[k]) n_stage0_copies++;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) in[i] = CELL_EMPTY;
  endtask

  // follow one cell through the stages and compare the input links
  task automatic trace(int id, logic alt, int expected [NS]);
    int seen [NS];
    int lat;
    for (int s = 0; s < NS; s++) seen[s] = -1;
    force_alt[6] = alt;
    in[6] = uc(id, 10);
    lat = 0;
    for (int t = 0; t < 30 && !(out[10].valid && out[10].payload[31:0] == 32'(id)); t++) begin
      #1;
      for (int s = 0; s < NS; s++)
        for (int j = 0; j < N; j++)
          if (dut.link_in[s][j].valid && dut.link_in[s][j].payload[31:0] == 32'(id)) seen[s] = j;
      @(posedge clk); #1;
      in[6] = CELL_EMPTY;
      lat++;
    end
    force_alt[6] = 0;
    check(lat == 2 * NS, $sformatf("inlet 6 to outlet 10 in %0d cycles", lat));
    for (int s = 0; s < NS; s++)
      check(seen[s] == expected[s], $sformatf("%s path, stage %0d: link %0d, expected %0d",
                                              alt ? "alternate" : "normal", s, seen[s], expected[s]));
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    int normal_links [NS] = '{6, 3, 9, 8, 10};
    int alt_links    [NS] = '{6, 11, 13, 10, 11};
    int mdest [5] = '{4, 6, 9, 14, 15};
    int id;
    cell_t c;
    for (int i = 0; i < N; i++) begin in[i] = CELL_EMPTY; force_alt[i] = 0; end
    for (int s = 0; s < NS; s++) for (int k = 0; k < H; k++) fault[s][k] = '0;
    n_stage0_copies = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    trace(1, 1'b0, normal_links);
    trace(2, 1'b1, alt_links);

    // broadcast from inlet 8
    c = uc(3, 0); c.bcast = 1'b1;
    in[8] = c;
    for (int o = 0; o < N; o++) exp_q[3 * 32 + o] = 1;
    repeat (20) collect();
    check(exp_q.size() == 0, "broadcast reaches all 16 outlets");
    check(n_stage0_copies == 0, "no copy in stage 0");

    // multicast from inlet 8 to 4, 6, 9, 14, 15
    c = uc(4, 0); c.mcast = 1'b1; c.mcnt = 5;
    for (int k = 0; k < 5; k++) begin
      c.maddr[k] = ADDR_W'(mdest[k]);
      exp_q[4 * 32 + mdest[k]] = 1;
    end
    in[8] = c;
    repeat (20) collect();
    check(exp_q.size() == 0, "multicast reaches outlets 4, 6, 9, 14, 15 only");

    // random unicast traffic
    id = 100;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++)
        if ($urandom % 100 < 20) begin
          int d;
          d = int'($urandom % N);
          in[i] = uc(id, d);
          exp_q[id * 32 + d] = 1;
          id++;
        end
      collect();
    end
    repeat (60) collect();
    check(exp_q.size() == 0, "random traffic: every cell delivered");
    check(lost == 0, "random traffic: no loss");
    $display("INFO: %0d random cells", id - 100);
    // network size: n+1 = 5 stages of N/2 = 8 FTSEs, N/2 (log2 N + 1) = 40 in all
    check(dut.NS == 5 && dut.H == 8 && dut.NF == 40, "5 stages of 8 FTSEs, 40 FTSEs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
