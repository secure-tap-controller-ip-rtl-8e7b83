// register_select_tb: checks that TDO shows, one falling edge later, the
// instruction register when SELECT is high and otherwise the data register the
// instruction picks, and that tdo_en follows ENABLE on the falling edge.
module register_select_tb;
  import stap_pkg::*;

  logic tck = 0, trst_n = 1, select = 0, enable = 0;
  dr_sel_e dr_sel = DR_BYPASS;
  logic ir_tdo = 0, bypass_tdo = 0, bsr_tdo = 0, tmp_tdo = 0, auth_tdo = 0;
  logic tdo, tdo_en;
  int checks = 0, failures = 0;

  register_select dut (.tck, .trst_n, .select, .enable, .dr_sel, .ir_tdo, .bypass_tdo,
                       .bsr_tdo, .tmp_tdo, .auth_tdo, .tdo, .tdo_en);

  always #5 tck = ~tck;

  initial begin
    repeat (2000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 trst_n = 0;
    #1 checks++;
    if (tdo !== 0 || tdo_en !== 0) begin failures++; $display("FAIL reset"); end
    #3 trst_n = 1;
    for (int k = 0; k < 500; k++) begin
      logic exp, old_tdo, old_en;
      @(posedge tck);
      select = 1'($urandom); enable = 1'($urandom); dr_sel = dr_sel_e'($urandom_range(0, 3));
      {ir_tdo, bypass_tdo, bsr_tdo, tmp_tdo, auth_tdo} = 5'($urandom);
      old_tdo = tdo; old_en = tdo_en;
      #1;
      checks++;
      if (tdo !== old_tdo || tdo_en !== old_en) begin failures++; $display("FAIL changed before falling edge"); end
      case (dr_sel)
        DR_BYPASS: exp = bypass_tdo;
        DR_BSR:    exp = bsr_tdo;
        DR_TMP:    exp = tmp_tdo;
        default:   exp = auth_tdo;
      endcase
      if (select) exp = ir_tdo;
      @(negedge tck); #1;
      checks++;
      if (tdo !== exp || tdo_en !== enable) begin failures++; $display("FAIL tdo %b expected %b", tdo, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
