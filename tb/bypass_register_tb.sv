// bypass_register_tb: checks that the selected bypass register captures 0 and
// delays TDI by exactly one TCK in Shift-DR, and that it holds when deselected.
module bypass_register_tb;
  logic tck = 0, trst_n = 1, tdi = 0, sel = 1, capture_dr = 0, shift_dr = 0;
  logic tdo;
  int checks = 0, failures = 0;

  bypass_register dut (.tck, .trst_n, .tdi, .sel, .capture_dr, .shift_dr, .tdo);

  always #5 tck = ~tck;

  initial begin
    repeat (1000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    #1 trst_n = 0;
    #2 trst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      @(negedge tck); tdi = 1; capture_dr = 1;
      @(negedge tck); capture_dr = 0;
      checks++;
      if (tdo !== 1'b0) begin failures++; $display("FAIL capture not 0"); end
      shift_dr = 1;
      prev = 1'b0;
      for (int i = 0; i < 40; i++) begin
        tdi = 1'($urandom);
        @(negedge tck);
        checks++;
        if (tdo !== tdi) begin failures++; $display("FAIL shift delay"); end
      end
      shift_dr = 0;
      prev = tdo;
      sel = 0; shift_dr = 1; tdi = ~prev;
      repeat (3) @(negedge tck);
      checks++;
      if (tdo !== prev) begin failures++; $display("FAIL deselected register moved"); end
      sel = 1; shift_dr = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
