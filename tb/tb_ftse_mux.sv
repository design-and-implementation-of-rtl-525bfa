// tb_ftse_mux: test of the output multiplexer: the OC's cell always wins,
// the spare OC's cell leaves only when the OC is empty.
module tb_ftse_mux;
  import atm_pkg::*;
  cell_t oc, soc, o;
  logic toc, tsoc;
  int checks = 0, failures = 0;

  ftse_mux dut (.oc_i(oc), .soc_i(soc), .cell_o(o), .take_oc_o(toc), .take_soc_o(tsoc));

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
    for (int m = 0; m < 4; m++) begin
      oc  = CELL_EMPTY; oc.payload[7:0]  = 8'hA1; oc.valid  = m[0];
      soc = CELL_EMPTY; soc.payload[7:0] = 8'hB2; soc.valid = m[1];
      #1;
      check(toc == m[0], "take OC when it holds a cell");
      check(tsoc == (m[1] && !m[0]), "take spare OC only when OC empty");
      check(o.valid == (m[0] || m[1]), "output valid");
      if (m[0])      check(o.payload[7:0] == 8'hA1, "OC cell first");
      else if (m[1]) check(o.payload[7:0] == 8'hB2, "spare OC cell when OC empty");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
