// auth_module_tb: runs the challenge-response protocol on the authentication
// module with the LBlock test-vector key, driving the TAP controls directly.
// Checks: a wrong response is refused, the right one (the LBlock encryption of
// the challenge, a published test vector) is accepted, a stale cipher text
// cannot be reused, LOCK clears the flag, the status word read back, and the
// 32-cycle encryption latency.
module auth_module_tb;
  import stap_pkg::*;

  logic tck = 0, tap_por_n = 1, tdi = 0;
  tap_ctrl_t ctrl;
  decode_t   dec;
  logic [79:0] device_key = 80'h0123456789abcdeffedc;
  logic tdo, authenticated, cipher_busy;
  int checks = 0, failures = 0;

  localparam logic [63:0] CHAL = 64'h0123456789abcdef;
  localparam logic [63:0] RESP = 64'h4b7179d8ebee0c26;

  auth_module dut (.tck, .tap_por_n, .tdi, .ctrl, .dec, .device_key, .tdo, .authenticated,
                   .cipher_busy);

  always #5 tck = ~tck;

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %b expected %b", what, got, exp); end
  endtask

  // A data scan under the current instruction: capture, 64 shifts, update.
  task automatic dr_scan(input logic [63:0] din, output logic [63:0] dout);
    @(negedge tck); ctrl = '0; ctrl.reset_n = 1; ctrl.capture_dr = 1;
    @(negedge tck); ctrl.capture_dr = 0; ctrl.shift_dr = 1;
    for (int i = 0; i < 64; i++) begin
      tdi = din[i]; dout[i] = tdo;
      @(negedge tck);
    end
    ctrl.shift_dr = 0; ctrl.update_dr = 1;
    @(negedge tck); ctrl.update_dr = 0;
  endtask

  task automatic set_instr(input int which);  // 0 chal, 1 resp, 2 lock, 3 bypass
    dec = '0;
    case (which)
      0: begin dec.auth_chal = 1; dec.dr_sel = DR_AUTH; end
      1: begin dec.auth_resp = 1; dec.dr_sel = DR_AUTH; end
      2: dec.lock = 1;
      default: dec.bypass = 1;
    endcase
  endtask

  task automatic challenge(input logic [63:0] c);
    logic [63:0] q;
    int cycles;
    set_instr(0);
    dr_scan(c, q);
    // the update edge started the cipher
    cycles = 0;   // falling edges seen with the cipher busy
    while (cipher_busy) begin cycles++; @(negedge tck); end
    checks++;
    if (cycles != 32) begin failures++; $display("FAIL encryption took %0d cycles", cycles); end
    @(negedge tck);
  endtask

  initial begin
    logic [63:0] q;
    ctrl = '0; ctrl.reset_n = 1; set_instr(3);
    #1 tap_por_n = 0;
    #1 expect_bit(authenticated, 0, "authenticated after power-on reset");
    #5 tap_por_n = 1;
    // wrong response
    challenge(CHAL);
    set_instr(1); dr_scan(RESP ^ 64'h1, q);
    expect_bit(q[1], 1, "cipher text ready in status");
    expect_bit(q[0], 0, "not yet authenticated in status");
    expect_bit(authenticated, 0, "wrong response refused");
    // the cipher text is spent: the right response now fails too
    dr_scan(RESP, q);
    expect_bit(q[1], 0, "cipher text spent");
    expect_bit(authenticated, 0, "stale cipher text refused");
    // fresh challenge, right response
    challenge(CHAL);
    set_instr(1); dr_scan(RESP, q);
    expect_bit(authenticated, 1, "right response accepted");
    dr_scan(64'h0, q);
    expect_bit(q[0], 1, "authenticated in status");
    expect_bit(authenticated, 0, "later wrong response clears the flag");
    challenge(64'h0);
    set_instr(1); dr_scan(64'h0, q);
    expect_bit(authenticated, 0, "response for another challenge refused");
    challenge(CHAL);
    set_instr(1); dr_scan(RESP, q);
    expect_bit(authenticated, 1, "accepted again");
    set_instr(3); @(negedge tck); @(negedge tck);
    expect_bit(authenticated, 1, "flag kept under BYPASS");
    set_instr(2); @(negedge tck); @(negedge tck);
    expect_bit(authenticated, 0, "LOCK clears the flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
