// tb_ftse: self-checking test of a whole 2x2 FTSE (stage 1 of a 3-stage
// network, so its routing bit is tag bit 1).  Directed cases check the
// two-cycle transfer, the spare IC standing in for a faulty IC, both ICs
// faulty (one cell waits in the spare IC's buffer), the spare OC standing
// in for a faulty OC, contention (low-priority cell one cycle later through
// the spare OC) and the BFS outputs.  A random phase with faults switched
// on and off checks that every cell leaves on the port its routing bit
// names, exactly once, or is counted lost.
module tb_ftse;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0;
  ftse_fault_t f;
  cell_t in [2], out [2];
  logic bui, bli, buo, blo;
  logic [3:0] lost;
  logic evc, evb, evf, evr, evsi, evso, evlow;
  logic [3:0] lvl;
  int checks = 0, failures = 0;

  ftse #(.NS(3), .STAGE(1), .DEPTH(4)) dut (
    .clk, .rst_n, .fault_i(f), .in_i(in), .out_o(out),
    .bfs_u_i(bui), .bfs_l_i(bli), .bfs_u_o(buo), .bfs_l_o(blo), .lost_o(lost),
    .ev_contention_o(evc), .ev_buffered_o(evb), .ev_from_buffer_o(evf),
    .ev_replicate_o(evr), .ev_spare_ic_o(evsi), .ev_spare_oc_o(evso),
    .ev_lower_buf_o(evlow), .buf_level_o(lvl));

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cell_t uc(int id, logic [2:0] tag, logic pr);
    cell_t c = CELL_EMPTY;
    c.valid = 1'b1;
    c.prio = pr;
    c.tag = ADDR_W'(tag);
    c.payload[31:0] = id;
    return c;
  endfunction

  function automatic int idof(cell_t c);
    return c.valid ? int'(c.payload[31:0]) : 0;
  endfunction

  // present cells for one clock, then idle
  task automatic send(cell_t a, cell_t b);
    in[0] = a; in[1] = b;
    @(posedge clk); #1;
    in[0] = CELL_EMPTY; in[1] = CELL_EMPTY;
  endtask

  int seen [int];
  int n_sent = 0, n_got = 0, n_lost = 0;

  initial begin
    f = '0; bui = 0; bli = 0;
    in[0] = CELL_EMPTY; in[1] = CELL_EMPTY;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // two-cycle transfer: out after the second edge
    send(uc(1, 3'b000, 0), uc(2, 3'b010, 0));
    check(!out[0].valid && !out[1].valid, "nothing after one cycle");
    @(posedge clk); #1;
    check(idof(out[0]) == 1 && idof(out[1]) == 2, "cells out after two cycles");
    @(posedge clk); #1;

    // IC_1 faulty: its cell enters through the spare IC, same latency
    f.ic[0] = 1;
    send(uc(3, 3'b010, 0), CELL_EMPTY);
    check(evsi, "spare IC carries the cell");
    @(posedge clk); #1;
    check(idof(out[1]) == 3, "cell via spare IC after two cycles");

    // both ICs faulty: higher priority first, the other one cycle later
    f.ic[1] = 1;
    send(uc(4, 3'b000, 0), uc(5, 3'b010, 1));
    @(posedge clk); #1;
    check(idof(out[1]) == 5 && !out[0].valid, "high-priority cell first via spare IC");
    @(posedge clk); #1;
    check(idof(out[0]) == 4, "buffered cell of the spare IC one cycle later");
    check(!buo && !blo, "no BFS while the spare IC works");
    f = '0;
    @(posedge clk); #1;

    // BFS: IC_1 + spare IC faulty -> BFS_u; downstream BFS_l forwarded
    f.ic[0] = 1; f.sic = 1; #1;
    check(buo && !blo, "BFS_u from IC_1 and spare IC");
    f = '0; f.oc[1] = 1; f.soc[1] = 1; #1;
    check(!buo && blo, "BFS_l from OC_2 and spare OC_2");
    f = '0; bli = 1; #1;
    check(!buo && blo, "downstream BFS_l forwarded");
    bli = 0; #1;
    check(!buo && !blo, "no BFS without faults");

    // OC_1 faulty: cell leaves through spare OC_1
    f.oc[0] = 1;
    send(uc(6, 3'b001, 0), CELL_EMPTY);
    @(posedge clk); #1;
    check(idof(out[0]) == 6 && evso, "cell via spare OC_1");
    f = '0;
    @(posedge clk); #1;

    // contention: high through OC, low through spare OC one cycle later
    send(uc(7, 3'b110, 0), uc(8, 3'b010, 1));
    check(evc, "contention seen");
    @(posedge clk); #1;
    check(idof(out[1]) == 8, "high-priority cell first");
    @(posedge clk); #1;
    check(idof(out[1]) == 7 && evso, "low-priority cell next, from spare OC");
    @(posedge clk); #1;

    // random traffic with changing faults
    for (int cyc = 0; cyc < 2000; cyc++) begin
      if (cyc % 100 == 0) f = (cyc % 300 == 0) ? '0 : ftse_fault_t'(7'($urandom) & 7'($urandom));
      for (int i = 0; i < 2; i++) begin
        in[i] = CELL_EMPTY;
        if ($urandom % 2 == 0) begin
          in[i] = uc(1000 + n_sent, 3'($urandom), 1'($urandom));
          n_sent++;
        end
      end
      #1;
      for (int p = 0; p < 2; p++) if (out[p].valid) begin
        int id;
        id = idof(out[p]);
        check(out[p].tag[1] == p[0], "cell leaves on the port its routing bit names");
        check(!seen.exists(id), $sformatf("cell %0d delivered once (cycle %0d port %0d fault %b)", id, cyc, p, f));
        seen[id] = 1;
        if (id >= 1000) n_got++;
      end
      if (cyc > 0) n_lost += int'(lost);
      @(posedge clk); #1;
    end
    in[0] = CELL_EMPTY; in[1] = CELL_EMPTY; f = '0;
    repeat (40) begin
      #1;
      for (int p = 0; p < 2; p++) if (out[p].valid) begin
        check(!seen.exists(idof(out[p])), "cell delivered once");
        seen[idof(out[p])] = 1;
        n_got++;
      end
      n_lost += int'(lost);
      @(posedge clk); #1;
    end
    $display("INFO: sent %0d delivered %0d lost %0d", n_sent, n_got, n_lost);
    check(n_sent == n_got + n_lost, "every cell delivered or counted lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
