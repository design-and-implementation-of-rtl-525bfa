// tb_atm_switch: end-to-end test of the fault tolerant ATM switch at its
// default size (4 x 4, three stages of two FTSEs).
//
// A scoreboard holds every (cell, outlet) delivery still expected; each cell
// leaving the switch must be expected there, exactly once.  Phases:
//  1. latency: one cell crosses the three stages in 2 x 3 = 6 clock cycles;
//  2. random unicast traffic, fault free: every cell arrives;
//  3. the same on the alternate path (path bit forced to 1);
//  4. single faults inside FTSEs (IC, OC): the spare IC / spare OC carry
//     the traffic and every cell arrives;
//  5. IC_1 and the spare IC of a second-stage FTSE fail: its BFS signal
//     reaches the inlets of the normal path, which switch to the alternate
//     path; every cell offered after the switch arrives;
//  6. broadcast and multicast cells reach exactly their outlets;
//  7. hot spot (all inlets to one outlet): contention, shared buffers
//     (upper and lower), cell loss; delivered + lost = offered.
// Each mechanism is counted and must have happened at least once.
module tb_atm_switch;
  import atm_pkg::*;
  localparam int N  = 4;
  localparam int NS = 3;
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

  atm_switch dut (
    .clk, .rst_n, .in_cell_i(in), .force_alt_i(force_alt), .fault_i(fault),
    .out_cell_o(out), .bfs_port_o(bfs), .lost_o(lost),
    .ev_contention_o(evc), .ev_buffered_o(evb), .ev_from_buffer_o(evf),
    .ev_replicate_o(evr), .ev_spare_ic_o(evsi), .ev_spare_oc_o(evso),
    .ev_lower_buf_o(evlow), .buf_cells_o(bufcells));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scoreboard: key = id * 16 + outlet
  int exp_q [int];
  int next_id = 1;
  int n_delivered = 0;
  int cnt_contention = 0, cnt_buffered = 0, cnt_from_buffer = 0, cnt_replicate = 0;
  int cnt_spare_ic = 0, cnt_spare_oc = 0, cnt_lower = 0, cnt_bfs = 0, cnt_alt = 0;

  function automatic cell_t uc(int id, int dest, logic pr);
    cell_t c = CELL_EMPTY;
    c.valid = 1'b1;
    c.prio = pr;
    c.tag = ADDR_W'(dest);
    c.payload[31:0] = id;
    c.payload[PAYLOAD_W-1 -: 32] = 32'hA7A7_0000 | 32'(id & 16'hFFFF);
    return c;
  endfunction

  // one clock: observe outputs and events, then advance
  task automatic tick();
    #1;
    for (int o = 0; o < N; o++) if (out[o].valid) begin
      int key;
      key = int'(out[o].payload[31:0]) * 16 + o;
      check(exp_q.exists(key), $sformatf("cell %0d expected at outlet %0d", out[o].payload[31:0], o));
      check(out[o].payload[PAYLOAD_W-1 -: 32] == (32'hA7A7_0000 | 32'(out[o].payload[15:0])),
            "payload intact");
      if (exp_q.exists(key)) exp_q.delete(key);
      n_delivered++;
    end
    cnt_contention  += $countones(evc);
    cnt_buffered    += $countones(evb);
    cnt_from_buffer += $countones(evf);
    cnt_replicate   += $countones(evr);
    cnt_spare_ic    += $countones(evsi);
    cnt_spare_oc    += $countones(evso);
    cnt_lower       += $countones(evlow);
    for (int i = 0; i < N; i++) if (bfs[i]) cnt_bfs++;
    @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) in[i] = CELL_EMPTY;
  endtask

  task automatic offer(int i, cell_t c);
    in[i] = c;
    if (c.bcast) begin
      for (int o = 0; o < N; o++) exp_q[int'(c.payload[31:0]) * 16 + o] = 1;
    end else if (c.mcast) begin
      for (int k = 0; k < int'(c.mcnt); k++) exp_q[int'(c.payload[31:0]) * 16 + int'(c.maddr[k][1:0])] = 1;
    end else begin
      exp_q[int'(c.payload[31:0]) * 16 + int'(c.tag[1:0])] = 1;
    end
    if (force_alt[i] || bfs[i]) cnt_alt++;
  endtask

  task automatic random_traffic(int cycles, int load_pct);
    for (int t = 0; t < cycles; t++) begin
      for (int i = 0; i < N; i++)
        if (int'($urandom % 100) < load_pct) begin
          offer(i, uc(next_id, int'($urandom % N), 1'($urandom)));
          next_id++;
        end
      tick();
    end
  endtask

  task automatic drain();
    repeat (40) tick();
  endtask

  initial begin
    int lost0, sent0, lat;
    for (int i = 0; i < N; i++) begin in[i] = CELL_EMPTY; force_alt[i] = 0; end
    for (int s = 0; s < NS; s++) for (int k = 0; k < H; k++) fault[s][k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. latency
    in[0] = uc(next_id, 3, 0);
    @(posedge clk); #1;
    in[0] = CELL_EMPTY;
    lat = 1;
    while (!out[3].valid && lat < 50) begin @(posedge clk); #1; lat++; end
    check(lat == 2 * NS, $sformatf("latency %0d cycles, expected %0d", lat, 2 * NS));
    check(out[3].payload[31:0] == 32'(next_id), "latency cell at outlet 3");
    next_id++;
    @(posedge clk); #1;

    // 2. fault-free random traffic
    random_traffic(400, 25);
    drain();
    check(exp_q.size() == 0, "fault free: every cell delivered");
    check(lost == 0, "fault free: no loss at 25% load");

    // 3. alternate path
    for (int i = 0; i < N; i++) force_alt[i] = 1;
    random_traffic(200, 25);
    drain();
    check(exp_q.size() == 0, "alternate path: every cell delivered");
    for (int i = 0; i < N; i++) force_alt[i] = 0;

    // 4. single faults inside FTSEs, set while idle
    fault[1][0].ic[1] = 1;
    fault[2][0].oc[1] = 1;
    fault[0][1].soc[0] = 1;
    lost0 = int'(lost);
    random_traffic(300, 25);
    drain();
    check(exp_q.size() == 0, "single faults: every cell delivered");
    check(int'(lost) == lost0, "single faults: nothing lost");
    for (int s = 0; s < NS; s++) for (int k = 0; k < H; k++) fault[s][k] = '0;

    // 5. IC_1 and spare IC of stage-1 FTSE 0 fail: BFS to inlets 0 and 1
    fault[1][0].ic[0] = 1;
    fault[1][0].sic = 1;
    #1;
    check(bfs[0] && bfs[1] && !bfs[2] && !bfs[3], "BFS reaches inlets 0 and 1 only");
    random_traffic(300, 25);
    drain();
    check(exp_q.size() == 0, "normal path broken: cells take the alternate path");
    for (int s = 0; s < NS; s++) for (int k = 0; k < H; k++) fault[s][k] = '0;

    // 6. broadcast and multicast
    begin
      cell_t c;
      c = uc(next_id, 0, 0); c.bcast = 1; offer(2, c); next_id++;
      tick();
      c = uc(next_id, 0, 1); c.mcast = 1; c.mcnt = 2;
      c.maddr[0] = ADDR_W'(1); c.maddr[1] = ADDR_W'(3); offer(0, c); next_id++;
      tick();
      c = uc(next_id, 0, 0); c.mcast = 1; c.mcnt = 3;
      c.maddr[0] = ADDR_W'(0); c.maddr[1] = ADDR_W'(2); c.maddr[2] = ADDR_W'(3); offer(1, c); next_id++;
      drain();
      check(exp_q.size() == 0, "broadcast and multicast copies delivered");
    end

    // 7. hot spot
    sent0 = next_id;
    lost0 = int'(lost);
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < N; i++) begin
        offer(i, uc(next_id, 1, 1'($urandom))); next_id++;
      end
      tick();
    end
    drain();
    drain();
    check(bufcells == 0, "buffers drained");
    check(exp_q.size() == int'(lost) - lost0, "hot spot: every cell delivered or counted lost");
    check(int'(lost) > lost0, "hot spot: cells lost");
    exp_q.delete();

    $display("INFO: delivered %0d lost %0d", n_delivered, lost);
    $display("INFO: contention %0d buffered %0d from-buffer %0d lower-buffer %0d replicate %0d",
             cnt_contention, cnt_buffered, cnt_from_buffer, cnt_lower, cnt_replicate);
    $display("INFO: spare-IC %0d spare-OC %0d BFS %0d alternate-path %0d",
             cnt_spare_ic, cnt_spare_oc, cnt_bfs, cnt_alt);
    check(cnt_contention > 0, "contention happened");
    check(cnt_buffered > 0, "buffering happened");
    check(cnt_from_buffer > 0, "buffered cells served");
    check(cnt_lower > 0, "lower shared buffer used");
    check(cnt_replicate > 0, "replication happened");
    check(cnt_spare_ic > 0, "spare IC used");
    check(cnt_spare_oc > 0, "spare OC used");
    check(cnt_bfs > 0, "BFS raised");
    check(cnt_alt > 0, "alternate path used");
    // network size: n+1 = 3 stages of N/2 = 2 FTSEs, N/2 (log2 N + 1) = 6 in all
    check(dut.NS == 3 && dut.H == 2 && dut.NF == 6, "3 stages of 2 FTSEs, 6 FTSEs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
