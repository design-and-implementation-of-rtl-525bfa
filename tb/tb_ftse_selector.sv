// tb_ftse_selector: exhaustive test of the 3x2 selector over all fault
// combinations of IC_1, IC_2 and the spare IC, against a table of which
// source must appear on each line.
module tb_ftse_selector;
  import atm_pkg::*;
  logic f1, f2, fs;
  cell_t a, s, b;
  cell_t o [2];
  int checks = 0, failures = 0;

  ftse_selector dut (.ic1_fault_i(f1), .ic2_fault_i(f2), .sic_fault_i(fs),
                     .ic1_i(a), .sic_i(s), .ic2_i(b), .sel_o(o));

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

  // expected id on each line: 1 = IC_1, 2 = spare IC, 3 = IC_2, 0 = none
  function automatic int id_of(cell_t c);
    return c.valid ? int'(c.payload[7:0]) : 0;
  endfunction

  initial begin
    a = CELL_EMPTY; a.valid = 1; a.payload[7:0] = 1;
    s = CELL_EMPTY; s.valid = 1; s.payload[7:0] = 2;
    b = CELL_EMPTY; b.valid = 1; b.payload[7:0] = 3;
    for (int m = 0; m < 8; m++) begin
      int e0, e1;
      {fs, f2, f1} = 3'(m);
      #1;
      // line 0: IC_1 when healthy, else the spare IC (if it works)
      e0 = !f1 ? 1 : (!fs ? 2 : 0);
      // line 1: IC_2 when healthy, else the spare IC unless line 0 took it
      e1 = !f2 ? 3 : ((!f1 && !fs) ? 2 : 0);
      check(id_of(o[0]) == e0, $sformatf("line 0, faults %b", m[2:0]));
      check(id_of(o[1]) == e1, $sformatf("line 1, faults %b", m[2:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
