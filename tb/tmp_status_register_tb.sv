// tmp_status_register_tb: checks the power-on value of the bypass-escape bit,
// the captured word {bypass_escape, tmp_status}, the shift order, the
// falling-edge update of the escape bit and that nothing happens unselected.
module tmp_status_register_tb;
  logic tck = 0, tap_por_n = 1, tdi = 0, sel = 1;
  logic capture_dr = 0, shift_dr = 0, update_dr = 0, tmp_status = 0;
  logic tdo, bypass_escape;
  int checks = 0, failures = 0;

  tmp_status_register dut (.tck, .tap_por_n, .tdi, .sel, .capture_dr, .shift_dr, .update_dr,
                           .tmp_status, .tdo, .bypass_escape);

  always #5 tck = ~tck;

  initial begin
    repeat (1000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %b expected %b", what, got, exp); end
  endtask

  // Capture, shift two bits (new bit 0 first, then new escape bit), update.
  task automatic scan(input logic [1:0] din, output logic [1:0] dout, input bit do_update);
    @(negedge tck); capture_dr = 1;
    @(negedge tck); capture_dr = 0; shift_dr = 1;
    for (int i = 0; i < 2; i++) begin
      tdi = din[i]; dout[i] = tdo;
      @(negedge tck);
    end
    shift_dr = 0;
    if (do_update) begin
      update_dr = 1;
      @(posedge tck);
      @(negedge tck); #1;
      update_dr = 0;
    end
  endtask

  initial begin
    logic [1:0] q;
    #1 tap_por_n = 0;
    #1 expect_bit(bypass_escape, 1'b1, "escape bit after power-on reset");
    #5 tap_por_n = 1;
    tmp_status = 1;
    scan(2'b00, q, 1);
    expect_bit(q[0], 1'b1, "captured tmp_status");
    expect_bit(q[1], 1'b1, "captured escape bit");
    expect_bit(bypass_escape, 1'b0, "escape bit written 0");
    tmp_status = 0;
    scan(2'b10, q, 1);
    expect_bit(q[0], 1'b0, "captured tmp_status");
    expect_bit(q[1], 1'b0, "captured escape bit");
    expect_bit(bypass_escape, 1'b1, "escape bit written 1");
    scan(2'b00, q, 0);
    expect_bit(q[0], 1'b0, "captured tmp_status (off, escape on)");
    expect_bit(q[1], 1'b1, "captured escape bit (off, escape on)");
    expect_bit(bypass_escape, 1'b1, "no update without Update-DR");
    sel = 0;
    scan(2'b00, q, 1);
    expect_bit(bypass_escape, 1'b1, "no update when not selected");
    sel = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
