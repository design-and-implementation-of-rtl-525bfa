// tb_ftse_shared_buffer: self-checking test of the two shared FIFOs.
// Random bursts of up to four writes and up to two reads per cycle.  Checks:
//  * cells leave in the order they were written (ids strictly increase)
//    and every written cell either leaves or is reported lost;
//  * the fill of the upper and the lower buffer and every loss match a
//    queue model of the rules: write the upper buffer first, move writing to
//    the other buffer only when the current one is full and the other one
//    is empty, read one buffer until it is empty;
//  * the lower buffer is used and cells are lost at least once.
module tb_ftse_shared_buffer;
  import atm_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  rl_entry_t push [4];
  logic      pushv [4];
  logic [1:0] pop_n;
  rl_entry_t peek [2];
  logic      peekv [2];
  logic [2:0] lost;
  logic [$clog2(D+1)-1:0] cnt [2];
  int checks = 0, failures = 0;

  ftse_shared_buffer #(.DEPTH(D), .PUSH_W(4), .POP_W(2)) dut (
    .clk, .rst_n, .push_i(push), .push_valid_i(pushv), .pop_n_i(pop_n),
    .peek_o(peek), .peek_valid_o(peekv), .lost_o(lost), .count_o(cnt));

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

  int q [2][$];
  bit ws, rs;
  int last_out = 0, n_in = 0, n_out = 0, n_lost = 0, lower_used = 0;

  initial begin
    int id = 1;
    for (int k = 0; k < 4; k++) begin push[k] = '0; pushv[k] = 0; end
    pop_n = 0;
    ws = 0; rs = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int np, npop, avail, exp_lost;
      // heavier writing in the first half, heavier reading in the second
      np = (cyc % 200 < 100) ? int'($urandom % 4) : int'($urandom % 2);
      avail = q[0].size() + q[1].size();
      npop = int'($urandom % 3);
      if (npop > avail) npop = avail;
      if (npop > 0) check(peekv[0], "a cell is shown when one is stored");
      if (npop > 1) check(peekv[1], "second cell shown");
      for (int k = 0; k < npop; k++) begin
        int got;
        got = int'(peek[k].c.payload[31:0]);
        check(got > last_out, "cells leave in order");
        last_out = got;
        n_out++;
      end
      pop_n = 2'(npop);
      for (int k = 0; k < 4; k++) begin
        pushv[k] = (k < np);
        push[k] = '0;
        push[k].c.valid = 1'b1;
        push[k].c.payload[31:0] = id + k;
        push[k].want = 2'b01;
      end
      // model
      for (int k = 0; k < npop; k++) begin
        void'(q[rs].pop_front());
        if (q[rs].size() == 0 && ws != rs) rs = ~rs;
      end
      exp_lost = 0;
      for (int k = 0; k < np; k++) begin
        if (q[ws].size() == D && q[~ws].size() == 0) begin
          ws = ~ws;
          if (q[rs].size() == 0) rs = ws;
        end
        if (q[ws].size() < D) q[ws].push_back(id + k);
        else exp_lost++;
      end
      if (q[0].size() == 0 && q[1].size() == 0) begin ws = 0; rs = 0; end
      #1;
      check(int'(lost) == exp_lost, $sformatf("loss count in cycle %0d", cyc));
      n_lost += exp_lost;
      n_in += np;
      id += np;
      @(posedge clk); #1;
      check(int'(cnt[0]) == q[0].size() && int'(cnt[1]) == q[1].size(),
            $sformatf("buffer fill in cycle %0d", cyc));
      if (cnt[1] != 0) lower_used++;
    end
    check(n_in == n_out + n_lost + q[0].size() + q[1].size(), "every cell accounted for");
    check(lower_used > 0 && n_lost > 0, "lower buffer and loss exercised");
    $display("INFO: in %0d out %0d lost %0d lower-buffer cycles %0d", n_in, n_out, n_lost, lower_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
