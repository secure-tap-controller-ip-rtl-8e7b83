// instruction_register_tb: drives the TAP control lines directly and checks
// the Capture-IR value (..01), right shifting with TDI into bit 3 and bit 0 at
// TDO, the falling-edge update of the active instruction, and the reset of the
// active instruction to BYPASS by Test-Logic-Reset and by TRSTN.
module instruction_register_tb;
  import stap_pkg::*;

  logic tck = 0, trst_n = 1, tdi = 0;
  tap_ctrl_t ctrl;
  logic [3:0] ir_shift, ir_latch;
  logic ir_tdo;
  int checks = 0, failures = 0;

  instruction_register dut (.tck, .trst_n, .tdi, .ctrl, .ir_shift, .ir_latch, .ir_tdo);

  always #5 tck = ~tck;

  initial begin
    repeat (2000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %b expected %b", what, got, exp); end
  endtask

  // One instruction scan: capture, shift 4 bits of code LSB first, update.
  task automatic load(input logic [3:0] code);
    logic [3:0] out;
    @(negedge tck); ctrl = '0; ctrl.reset_n = 1; ctrl.capture_ir = 1; ctrl.clock_ir = 1;
    @(negedge tck); ctrl.capture_ir = 0; ctrl.shift_ir = 1;
    expect_eq(ir_shift, 4'b0101, "captured value");
    for (int i = 0; i < 4; i++) begin
      tdi = code[i];
      out[i] = ir_tdo;
      @(negedge tck);
    end
    expect_eq(out, 4'b0101, "bits shifted out");
    expect_eq(ir_shift, code, "shift stage");
    ctrl.shift_ir = 0; ctrl.clock_ir = 0; ctrl.update_ir = 1;
    @(posedge tck); #1;
    @(negedge tck); #1;
    expect_eq(ir_latch, code, "active instruction after update");
    ctrl.update_ir = 0;
  endtask

  initial begin
    logic [3:0] prev_latch;
    ctrl = '0; ctrl.reset_n = 1;
    #1 trst_n = 0;
    #1 expect_eq(ir_latch, 4'b1111, "latch under TRSTN");
    #10 trst_n = 1;
    load(4'b1010);
    load(4'b0110);
    // no update without Update-IR
    prev_latch = ir_latch;
    @(negedge tck); ctrl.shift_ir = 1; tdi = 1;
    repeat (4) @(negedge tck);
    ctrl.shift_ir = 0;
    repeat (2) @(negedge tck);
    expect_eq(ir_latch, prev_latch, "latch holds while shifting");
    for (int k = 0; k < 20; k++) load(4'($urandom));
    // Test-Logic-Reset forces BYPASS on the falling edge
    @(negedge tck); ctrl.reset_n = 0;
    @(posedge tck); @(negedge tck); #1;
    expect_eq(ir_latch, 4'b1111, "latch in Test-Logic-Reset");
    ctrl.reset_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
