// tb_ftse_spare_ic: self-checking test of the spare IC.
// Random cells arrive on both demux lines with random priorities; a
// reference model in the testbench (one-cell buffer, highest priority and
// then oldest first, third cell dropped) predicts every output cell and
// every loss.  A faulty spare IC must deliver nothing.
module tb_ftse_spare_ic;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0, fault = 0;
  cell_t a, b, o;
  logic status;
  logic [2:0] lost;
  int checks = 0, failures = 0;
  int n_lost = 0, n_buf = 0;

  ftse_spare_ic dut (.clk, .rst_n, .fault_i(fault), .a_i(a), .b_i(b), .cell_o(o),
                     .status_o(status), .lost_o(lost));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cell_t mk(int id, logic pr);
    cell_t c = CELL_EMPTY;
    c.valid = 1'b1;
    c.prio = pr;
    c.payload[31:0] = id;
    return c;
  endfunction

  // model: list ordered oldest first; pick first high-priority, else first
  cell_t mbuf;
  cell_t mout;
  initial begin
    int id = 1;
    a = CELL_EMPTY; b = CELL_EMPTY;
    mbuf = CELL_EMPTY; mout = CELL_EMPTY;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      cell_t l [$];
      int pick;
      l.delete();
      fault = (cyc >= 550);
      a = CELL_EMPTY;
      b = CELL_EMPTY;
      if ($urandom % 3 != 0) begin a = mk(id, 1'($urandom)); id++; end
      if ($urandom % 3 != 0) begin b = mk(id, 1'($urandom)); id++; end
      #1;
      if (mbuf.valid) l.push_back(mbuf);
      if (a.valid) l.push_back(a);
      if (b.valid) l.push_back(b);
      if (fault) begin
        check(int'(lost) == int'(a.valid) + int'(b.valid) + int'(mbuf.valid) + int'(mout.valid),
              "faulty spare IC drops its inputs and what it held");
        l.delete();
      end else begin
        check(int'(lost) == ((l.size() == 3) ? 1 : 0), "loss when three cells compete");
        if (l.size() == 3) n_lost++;
      end
      pick = -1;
      foreach (l[i]) if (pick < 0 && l[i].prio) pick = i;
      if (pick < 0 && l.size() > 0) pick = 0;
      mout = CELL_EMPTY;
      if (pick >= 0) begin mout = l[pick]; l.delete(pick); end
      pick = -1;
      foreach (l[i]) if (pick < 0 && l[i].prio) pick = i;
      if (pick < 0 && l.size() > 0) pick = 0;
      mbuf = CELL_EMPTY;
      if (pick >= 0) begin mbuf = l[pick]; n_buf++; end
      @(posedge clk); #1;
      check(o.valid == mout.valid && (!o.valid || o.payload[31:0] == mout.payload[31:0]),
            $sformatf("output cell in cycle %0d", cyc));
      check(status == fault, "status");
      a = CELL_EMPTY; b = CELL_EMPTY;
    end
    check(n_lost > 0 && n_buf > 0, "buffer and loss both exercised");
    $display("INFO: buffered %0d, lost %0d", n_buf, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
