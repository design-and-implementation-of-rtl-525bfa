// tb_ftse_oc: test of the output controller: load, hold until taken,
// free flag, load while being taken, and a fault emptying it; then 1000
// random cycles of loads, takes and faults against a one-cell reference.
module tb_ftse_oc;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0, fault = 0, load = 0, take = 0;
  cell_t ci, co;
  logic freeo, status;
  int checks = 0, failures = 0;

  ftse_oc dut (.clk, .rst_n, .fault_i(fault), .load_i(load), .cell_i(ci), .take_i(take),
               .cell_o(co), .free_o(freeo), .status_o(status));

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

  function automatic cell_t mk(int id);
    cell_t c = CELL_EMPTY;
    c.valid = 1'b1;
    c.payload[31:0] = id;
    return c;
  endfunction

  initial begin
    ci = CELL_EMPTY;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!co.valid && freeo, "empty after reset");
    ci = mk(5); load = 1;
    @(posedge clk); #1 load = 0;
    check(co.valid && co.payload[31:0] == 5, "cell loaded");
    check(!freeo, "full while not taken");
    @(posedge clk); #1;
    check(co.valid && co.payload[31:0] == 5, "cell held while not taken");
    take = 1; #1;
    check(freeo, "free while being taken");
    ci = mk(6); load = 1;
    @(posedge clk); #1 load = 0; take = 0;
    check(co.valid && co.payload[31:0] == 6, "new cell replaces taken one");
    take = 1;
    @(posedge clk); #1 take = 0;
    check(!co.valid, "empty after take");
    ci = mk(7); load = 1; fault = 1; #1;
    check(!freeo && status, "faulty OC is never free and reports fault");
    @(posedge clk); #1 load = 0;
    check(!co.valid, "faulty OC holds nothing");
    // random phase: the reference holds at most one cell
    begin
      logic rv = 1'b0;
      int rid = 0, nid = 100;
      fault = 0; load = 0; take = 0;
      @(posedge clk); #1;
      for (int cyc = 0; cyc < 1000; cyc++) begin
        fault = ($urandom_range(0, 19) == 0);
        take  = rv && !fault && $urandom_range(0, 1) == 1;
        #1;
        check(freeo == (!fault && (!rv || take)), "free flag");
        check(status == fault, "status follows fault");
        check(co.valid == rv && (!rv || int'(co.payload[31:0]) == rid), "held cell");
        load = freeo && $urandom_range(0, 2) != 0;
        ci = mk(nid);
        @(posedge clk); #1;
        if (fault) rv = 1'b0;
        else if (load) begin rv = 1'b1; rid = nid; end
        else if (take) rv = 1'b0;
        nid++;
        load = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
