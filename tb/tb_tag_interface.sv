// tb_tag_interface: test of the routing-tag interface for a 16 x 16 switch
// (5 stages): the path bit (bit 4) of the tag and of every multicast
// address must follow the BFS input or the force input, the outlet bits
// must stay, and an idle input must give an idle output.
module tb_tag_interface;
  import atm_pkg::*;
  cell_t ci, co;
  logic bfs, frc;
  int checks = 0, failures = 0;

  tag_interface #(.NS(5)) dut (.cell_i(ci), .bfs_i(bfs), .force_alt_i(frc), .cell_o(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int m = 0; m < 64; m++) begin
      logic alt;
      ci = CELL_EMPTY;
      ci.valid = (m % 8) != 7;
      ci.tag = ADDR_W'(m % 16);
      ci.mcast = 1'b1;
      ci.mcnt = 3;
      for (int k = 0; k < MAX_DEST; k++) ci.maddr[k] = ADDR_W'((m + 3 * k) % 16);
      ci.payload[15:0] = 16'(m);
      bfs = m[4];
      frc = m[5];
      alt = bfs | frc;
      #1;
      if (!ci.valid) begin
        check(co == CELL_EMPTY, "idle in, idle out");
      end else begin
        check(co.tag == {alt, 4'(m % 16)}, "tag gets path bit");
        for (int k = 0; k < MAX_DEST; k++)
          check(co.maddr[k] == {alt, 4'((m + 3 * k) % 16)}, "address gets path bit");
        check(co.payload == ci.payload && co.mcnt == ci.mcnt, "rest unchanged");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
