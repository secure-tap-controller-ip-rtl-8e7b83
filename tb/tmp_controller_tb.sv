// tmp_controller_tb: walks the test-mode-persistence controller through its
// transitions: power-on reset to Persistence-Off, CLAMP_HOLD to On, holding On
// across the TAP reset (CHReset* kept high), CLAMP_RELEASE to Off, the bypass
// escape with the escape bit set and no escape with it clear.
module tmp_controller_tb;
  logic tck = 0, tap_por_n = 1;
  logic clamp_hold_dec = 0, clamp_release_dec = 0, bypass_dec = 0, update_ir = 0;
  logic reset_n = 1, bypass_escape = 1;
  logic chreset_n, tmp_status;
  int checks = 0, failures = 0;

  tmp_controller dut (.tck, .tap_por_n, .clamp_hold_dec, .clamp_release_dec, .bypass_dec,
                      .update_ir, .reset_n, .bypass_escape, .chreset_n, .tmp_status);

  always #5 tck = ~tck;

  initial begin
    repeat (1000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_st(input logic st, input logic chr, input string what);
    checks++;
    if (tmp_status !== st || chreset_n !== chr) begin
      failures++;
      $display("FAIL %s: tmp_status=%b chreset_n=%b expected %b %b", what, tmp_status, chreset_n, st, chr);
    end
  endtask

  task automatic clk(int n = 1);
    repeat (n) @(posedge tck);
    #1;
  endtask

  initial begin
    #1 tap_por_n = 0;
    #1 expect_st(0, 1, "after power-on reset");
    reset_n = 0; #1 expect_st(0, 0, "TAP reset passes to CHReset*");
    reset_n = 1;
    #5 tap_por_n = 1;
    clk(3); expect_st(0, 1, "stays off");
    clamp_hold_dec = 1; clk(); expect_st(1, 1, "CLAMP_HOLD turns on");
    clamp_hold_dec = 0; clk(5); expect_st(1, 1, "persists");
    reset_n = 0; clk(3); expect_st(1, 1, "persists through TAP reset, CHReset* held");
    reset_n = 1;
    update_ir = 1; clk(); expect_st(1, 1, "Update-IR alone does not escape");
    update_ir = 0;
    clamp_release_dec = 1; clk(); expect_st(0, 1, "CLAMP_RELEASE turns off");
    clamp_release_dec = 0;
    clamp_hold_dec = 1; clamp_release_dec = 1; clk(); expect_st(0, 1, "release wins");
    clamp_release_dec = 0; clk(); expect_st(1, 1, "on again");
    clamp_hold_dec = 0;
    bypass_escape = 0; bypass_dec = 1; update_ir = 1; clk();
    expect_st(1, 1, "no escape with escape bit clear");
    bypass_escape = 1; clk(); expect_st(0, 1, "bypass escape");
    update_ir = 0; bypass_dec = 0;
    clamp_hold_dec = 1; clk(); clamp_hold_dec = 0;
    expect_st(1, 1, "on before power-on reset");
    #2 tap_por_n = 0; #1 expect_st(0, 1, "asynchronous power-on reset");
    tap_por_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
