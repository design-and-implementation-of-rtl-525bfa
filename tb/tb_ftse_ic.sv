// tb_ftse_ic: self-checking test of the input controller.
// A healthy IC must deliver each arriving cell one clock later and nothing
// to the spare IC; a faulty IC must steer arriving cells to the spare IC at
// once, deliver nothing itself and report its fault.
module tb_ftse_ic;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0, fault = 0;
  cell_t cin, cout, tospare;
  logic status, lost;
  int checks = 0, failures = 0;

  ftse_ic dut (.clk, .rst_n, .fault_i(fault), .cell_i(cin), .cell_o(cout),
               .to_spare_o(tospare), .status_o(status), .lost_o(lost));

  always #5 clk = ~clk;
  initial begin
    repeat (200) @(posedge clk);
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
    c.tag = ADDR_W'(id);
    return c;
  endfunction

  initial begin
    cin = CELL_EMPTY;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 1; i <= 20; i++) begin
      cin = mk(i);
      fault = (i > 10);
      #1;
      if (fault) check(tospare == cin, "faulty IC steers cell to spare IC");
      else       check(!tospare.valid, "healthy IC sends nothing to spare IC");
      check(status == fault, "status follows fault");
      check(lost == (i == 11), "cell held when the IC fails is lost");
      @(posedge clk); #1;
      if (fault) check(!cout.valid, "faulty IC delivers nothing");
      else       check(cout.valid && cout.payload[31:0] == 32'(i), "cell delivered one cycle later");
    end
    fault = 0; cin = CELL_EMPTY;
    @(posedge clk); #1;
    check(!cout.valid, "empty input gives empty output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
