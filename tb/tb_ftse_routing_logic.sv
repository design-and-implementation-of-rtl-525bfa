// tb_ftse_routing_logic: directed test of the routing logic of a middle
// stage (stage 1 of 3, routing bit 1).  Each scenario drives the selector
// lines and the OC state for one cycle and checks the OC / spare OC load
// strobes and cells against hand-worked results:
//  unicast to each port; two cells to different ports; contention resolved
//  by priority (high -> OC, low -> spare OC); contention with a faulty OC
//  (high -> spare OC, low -> buffer); buffered cells served before newer
//  arrivals, in order; broadcast copied to both ports; multicast split with
//  the address list pruned per port; a port with both OCs faulty dropping
//  its cells.
// A random phase then runs 2000 cycles of unicast traffic with random
// priorities, controller faults and busy OCs, and checks against rules
// rather than a model: every cell leaves by the port its tag names, through
// a controller that was free and healthy, at most once; an OC never gets a
// lower-priority cell than its spare OC in the same cycle; cells are never
// created or lost unseen (arrived = delivered + lost + buffered); and once
// the faults clear, the buffers drain and every cell is accounted for.
module tb_ftse_routing_logic;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0;
  cell_t in [2];
  logic [1:0] ocf, socf, ocfree, socfree;
  logic [1:0] ocl, socl;
  cell_t occ [2], socc [2];
  logic [2:0] lost;
  logic evc, evb, evf, evr, evlow;
  logic [3:0] lvl;
  int checks = 0, failures = 0;

  ftse_routing_logic #(.NS(3), .STAGE(1), .DEPTH(4)) dut (
    .clk, .rst_n, .in_i(in), .oc_fault_i(ocf), .soc_fault_i(socf),
    .oc_free_i(ocfree), .soc_free_i(socfree),
    .oc_load_o(ocl), .oc_cell_o(occ), .soc_load_o(socl), .soc_cell_o(socc),
    .lost_o(lost), .ev_contention_o(evc), .ev_buffered_o(evb),
    .ev_from_buffer_o(evf), .ev_replicate_o(evr), .ev_lower_buf_o(evlow), .buf_level_o(lvl));

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

  // unicast cell: tag = 3-bit routing tag, routing bit for this stage = tag[1]
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

  task automatic idle();
    in[0] = CELL_EMPTY; in[1] = CELL_EMPTY;
  endtask

  // expect: ids on OC0, SOC0, OC1, SOC1 (0 = no load)
  task automatic expect_out(int o0, int s0, int o1, int s1, string what);
    check((ocl[0] ? idof(occ[0]) : 0) == o0, {what, ": OC_1"});
    check((socl[0] ? idof(socc[0]) : 0) == s0, {what, ": spare OC_1"});
    check((ocl[1] ? idof(occ[1]) : 0) == o1, {what, ": OC_2"});
    check((socl[1] ? idof(socc[1]) : 0) == s1, {what, ": spare OC_2"});
  endtask

  initial begin
    cell_t m;
    idle();
    ocf = 0; socf = 0; ocfree = 2'b11; socfree = 2'b11;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // 1. unicast to each port
    in[0] = uc(1, 3'b000, 0); #1;
    expect_out(1, 0, 0, 0, "unicast upper");
    @(posedge clk); #1;
    in[0] = CELL_EMPTY; in[1] = uc(2, 3'b010, 0); #1;
    expect_out(0, 0, 2, 0, "unicast lower");
    @(posedge clk); #1;
    // 2. no contention
    in[0] = uc(3, 3'b010, 0); in[1] = uc(4, 3'b101, 0); #1;
    expect_out(4, 0, 3, 0, "two cells, two ports");
    check(!evc && !evb, "no contention, nothing buffered");
    @(posedge clk); #1;
    // 3. contention, no fault: high priority to OC, low to spare OC
    in[0] = uc(5, 3'b010, 0); in[1] = uc(6, 3'b111, 1); #1;
    expect_out(0, 0, 6, 5, "contention by priority");
    check(evc && !evb, "contention flagged, nothing buffered");
    @(posedge clk); #1;
    // 4. contention with OC_1 faulty: high -> spare OC_1, low -> buffer
    ocf = 2'b01;
    in[0] = uc(7, 3'b000, 1); in[1] = uc(8, 3'b001, 0); #1;
    expect_out(0, 7, 0, 0, "contention, OC_1 faulty");
    check(evb, "low-priority cell buffered");
    @(posedge clk); #1;
    idle(); #1;
    check(lvl == 1, "one cell in the buffers");
    expect_out(0, 8, 0, 0, "buffered cell served through spare OC_1");
    check(evf, "served from buffer");
    @(posedge clk); #1;
    ocf = 2'b00;
    // 5. buffer first: fill with spare OC_2 busy, then new arrivals queue behind
    socfree = 2'b00;
    in[0] = uc(9, 3'b010, 1); in[1] = uc(10, 3'b110, 0); #1;
    expect_out(0, 0, 9, 0, "spare OC_2 busy: low cell waits");
    @(posedge clk); #1;
    in[0] = uc(11, 3'b000, 0); in[1] = uc(12, 3'b000, 0); #1;
    // served: 10 (buffer) and 11; 12 waits
    expect_out(11, 0, 10, 0, "buffered cell first, then the oldest arrival");
    check(evf && evb, "buffer read and written in one cycle");
    @(posedge clk); #1;
    idle(); socfree = 2'b11; #1;
    expect_out(12, 0, 0, 0, "last waiting cell");
    @(posedge clk); #1;
    check(lvl == 0, "buffers empty again");
    // 6. broadcast: copied to both ports
    m = uc(13, 3'b000, 0); m.bcast = 1'b1;
    in[0] = m; in[1] = CELL_EMPTY; #1;
    expect_out(13, 0, 13, 0, "broadcast copied");
    check(evr, "replication flagged");
    @(posedge clk); #1;
    // 7. multicast: addresses 010, 000, 011 -> port 1 gets {010, 011}, port 0 gets {000}
    m = uc(14, 3'b000, 0); m.mcast = 1'b1; m.mcnt = 3;
    m.maddr[0] = ADDR_W'(5'b00010); m.maddr[1] = ADDR_W'(5'b00000); m.maddr[2] = ADDR_W'(5'b00011);
    in[0] = m; #1;
    expect_out(14, 0, 14, 0, "multicast copied");
    check(occ[0].mcnt == 1 && occ[0].maddr[0] == ADDR_W'(5'b00000), "upper copy keeps address 000");
    check(occ[1].mcnt == 2 && occ[1].maddr[0] == ADDR_W'(5'b00010) && occ[1].maddr[1] == ADDR_W'(5'b00011),
          "lower copy keeps addresses 010, 011");
    @(posedge clk); #1;
    // multicast with all addresses behind one port: no copy
    m.maddr[0] = ADDR_W'(5'b00000); m.maddr[1] = ADDR_W'(5'b00101); m.maddr[2] = ADDR_W'(5'b00100); m.payload[31:0] = 15;
    in[0] = m; #1;
    expect_out(15, 0, 0, 0, "multicast, one port");
    check(occ[0].mcnt == 3, "all addresses kept");
    @(posedge clk); #1;
    // 8. both controllers of port 0 faulty: cell dropped
    ocf = 2'b01; socf = 2'b01;
    in[0] = uc(16, 3'b000, 0); in[1] = uc(17, 3'b010, 0); #1;
    expect_out(0, 0, 17, 0, "dead port");
    check(lost == 1, "one cell lost");
    @(posedge clk); #1;
    idle(); ocf = 0; socf = 0;
    @(posedge clk); #1;
    // 9. random unicast traffic, checked against rules
    begin
      int arrived = 0, delivered = 0, lost_tot = 0, nid = 100;
      logic [1:0] port_of [int];
      bit seen [int];
      for (int cyc = 0; cyc < 2100; cyc++) begin
        if (cyc % 100 == 0) begin
          ocf  = (cyc < 2000 && $urandom_range(0, 2) == 0) ? 2'($urandom) : 2'b00;
          socf = (cyc < 2000 && $urandom_range(0, 2) == 0) ? 2'($urandom) : 2'b00;
        end
        ocfree  = ~ocf  & ((cyc < 2000) ? 2'($urandom | $urandom) : 2'b11);
        socfree = ~socf & ((cyc < 2000) ? 2'($urandom) : 2'b11);
        for (int i = 0; i < 2; i++) begin
          in[i] = CELL_EMPTY;
          if (cyc < 2000 && $urandom_range(0, 99) < 45) begin
            in[i] = uc(nid, 3'($urandom), 1'($urandom));
            port_of[nid] = {1'b0, in[i].tag[1]};
            nid++;
            arrived++;
          end
        end
        #1;
        for (int q = 0; q < 2; q++) begin
          if (ocl[q]) begin
            check(ocfree[q] && !ocf[q], "OC loaded only when free and healthy");
            check(occ[q].valid && port_of.exists(idof(occ[q])) && port_of[idof(occ[q])] == 2'(q),
                  "OC cell belongs to this port");
            check(!seen.exists(idof(occ[q])), "OC cell delivered once");
            seen[idof(occ[q])] = 1'b1;
            delivered++;
          end
          if (socl[q]) begin
            check(socfree[q] && !socf[q], "spare OC loaded only when free and healthy");
            check(socc[q].valid && port_of.exists(idof(socc[q])) && port_of[idof(socc[q])] == 2'(q),
                  "spare OC cell belongs to this port");
            check(!seen.exists(idof(socc[q])), "spare OC cell delivered once");
            seen[idof(socc[q])] = 1'b1;
            delivered++;
          end
          if (ocl[q] && socl[q])
            check(occ[q].prio >= socc[q].prio, "OC gets the higher-priority cell");
        end
        lost_tot += int'(lost);
        @(posedge clk); #1;
        check(arrived == delivered + lost_tot + int'(lvl), "cells conserved");
      end
      check(lvl == 0, "buffers drained after faults clear");
      check(arrived == delivered + lost_tot, "every cell delivered or lost");
      check(lost_tot > 0 && delivered > 1000, "random phase exercised losses and deliveries");
      $display("INFO: random phase arrived %0d delivered %0d lost %0d", arrived, delivered, lost_tot);
    end
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
