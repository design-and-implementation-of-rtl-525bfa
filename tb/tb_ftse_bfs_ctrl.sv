// tb_ftse_bfs_ctrl: exhaustive test of the backward fault signal
// controller over all 2^9 combinations of unit faults and downstream
// signals, against the fault rules of each half.
module tb_ftse_bfs_ctrl;
  import atm_pkg::*;
  ftse_fault_t st;
  logic ui, li, uo, lo;
  int checks = 0, failures = 0;

  ftse_bfs_ctrl dut (.st_i(st), .bfs_u_i(ui), .bfs_l_i(li), .bfs_u_o(uo), .bfs_l_o(lo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 512; m++) begin
      logic eu, el;
      {ui, li, st} = 9'(m);
      #1;
      eu = ui | (st.ic[0] & st.sic) | (st.oc[0] & st.soc[0]);
      el = li | (st.ic[1] & st.sic) | (st.oc[1] & st.soc[1]);
      checks += 2;
      if (uo !== eu) begin failures++; $display("FAIL: BFS_u for %b", m[8:0]); end
      if (lo !== el) begin failures++; $display("FAIL: BFS_l for %b", m[8:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
