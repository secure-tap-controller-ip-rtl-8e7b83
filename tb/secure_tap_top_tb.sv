// secure_tap_top_tb: end-to-end test of the secure TAP core through its pins
// only (TCK, TMS, TDI, TRSTN, TAP_POR*, TDO), at the default parameters.
//
// A small behavioural boundary register (8 cells) sits on the bsr_* ports.
// The test runs the 40-bit TMS pattern that exercises every TAP state, reads
// the Capture-IR value, checks bypassing, shows that test instructions are
// masked before authentication, authenticates with the LBlock challenge and
// response (after one refused attempt), then uses EXTEST through the boundary
// register, CLAMP_HOLD persistence across Test-Logic-Reset, the TMP status
// register, the bypass escape (enabled and disabled), CLAMP_RELEASE and LOCK,
// and a bypass scan that halts in Pause-DR halfway.
// Each mechanism is counted and must occur at least once.
module secure_tap_top_tb;
  import stap_pkg::*;

  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tap_por_n = 1;
  logic [79:0] device_key = 80'h0123456789abcdeffedc;
  logic bsr_tdo;
  logic tdo, tdo_en, bsr_capture, bsr_clock, bsr_shift, bsr_update, bsr_mode, bsr_reset_n;
  logic tmp_status, authenticated, auth_busy;
  tap_state_e tap_state;
  logic [3:0] active_instr;
  int checks = 0, failures = 0;

  localparam logic [63:0] CHAL = 64'h0123456789abcdef;
  localparam logic [63:0] RESP = 64'h4b7179d8ebee0c26;

  secure_tap_top dut (.*);

  always #50 tck = ~tck;   // 10 MHz TCK

  // Behavioural boundary register: 8 cells, shifts towards bit 0, captures PINS.
  localparam logic [7:0] PINS = 8'hA5;
  logic [7:0] bsr_sh = '0, bsr_upd = '0;
  always @(posedge tck)
    if (bsr_capture) bsr_sh <= PINS;
    else if (bsr_shift) bsr_sh <= {tdi, bsr_sh[7:1]};
  always @(negedge tck) if (bsr_update) bsr_upd <= bsr_sh;
  assign bsr_tdo = bsr_sh[0];

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_states_seen, n_masked, n_auth_fail, n_auth_ok, n_extest, n_persist_tlr;
  int n_escape, n_escape_blocked, n_release, n_lock, n_bypass, n_pause;

  task automatic expect_v(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  task automatic clk_tms(input logic t, input logic d = 0);
    @(negedge tck); tms = t; tdi = d;
    @(posedge tck);
    #1;
  endtask

  // From Run-Test/Idle: shift n bits (LSB first) through IR or DR, back to Run-Test/Idle.
  // TDO is sampled on the rising edge that shifts the next bit in.
  task automatic scan(input bit is_ir, input int n, input logic [63:0] din,
                      output logic [63:0] dout);
    clk_tms(1);                       // Select-DR
    if (is_ir) clk_tms(1);            // Select-IR
    clk_tms(0);                       // Capture
    clk_tms(0);                       // Shift
    dout = '0;
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
      #1;
      checks++;
      if (!tdo_en) begin failures++; $display("FAIL tdo_en low while shifting"); end
    end
    clk_tms(1);                       // Update
    clk_tms(0);                       // Run-Test/Idle
  endtask

  // Bypass scan of 2*half bits that stops in Pause-DR for three TCKs halfway.
  task automatic scan_paused(input int half, input logic [63:0] din, output logic [63:0] dout);
    clk_tms(1); clk_tms(0); clk_tms(0);          // Select-DR, Capture-DR, Shift-DR
    dout = '0;
    for (int i = 0; i < 2 * half; i++) begin
      @(negedge tck); tms = (i == half - 1) || (i == 2 * half - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
      #1;
      if (i == half - 1) begin                   // now in Exit1-DR
        clk_tms(0); clk_tms(0); clk_tms(0);      // Pause-DR
        if (tap_state == PAUSE_DR && !tdo_en) n_pause++;
        clk_tms(1);                              // Exit2-DR
        clk_tms(0);                              // Shift-DR
      end
    end
    clk_tms(1); clk_tms(0);                      // Update-DR, Run-Test/Idle
  endtask

  task automatic load_ir(input logic [3:0] code, output logic [3:0] captured);
    logic [63:0] q;
    scan(1, 4, 64'(code), q);
    captured = q[3:0];
  endtask

  task automatic idle(int n);
    repeat (n) clk_tms(0);
  endtask

  task automatic go_tlr();
    repeat (5) clk_tms(1);
    clk_tms(0);
  endtask

  localparam string PATTERN = "1011000100010000110001000010001000110011";

  initial begin
    logic [63:0] q;
    logic [3:0] cap;
    bit seen [16];
    #10 tap_por_n = 0; trst_n = 0;
    #10 expect_v(tap_state, TLR, "state under reset");
    expect_v(active_instr, OP_BYPASS, "BYPASS under reset");
    #200 tap_por_n = 1; trst_n = 1;

    // 1. the 40-bit TMS pattern from Test-Logic-Reset visits every state
    for (int i = 0; i < PATTERN.len(); i++) begin
      clk_tms(PATTERN[i] == "1");
      #1 seen[tap_state] = 1;
    end
    n_states_seen = 0;
    foreach (seen[i]) n_states_seen += seen[i];
    expect_v(n_states_seen, 16, "states visited by the TMS pattern");
    go_tlr();

    // 2. Capture-IR value and bypass
    load_ir(OP_BYPASS, cap);
    expect_v(cap, 4'b0101, "Capture-IR value shifted out");
    scan(0, 40, 64'h00_C3A5_5A3C, q);
    expect_v(q[39:1], 64'h00_C3A5_5A3C & 64'h7F_FFFF_FFFF, "bypass one-bit delay");
    expect_v(q[0], 0, "bypass captures 0");
    n_bypass++;
    scan_paused(8, 64'hB5E1, q);
    expect_v(q[15:0], 16'(16'hB5E1 << 1), "bypass data intact across Pause-DR");

    // 3. before authentication EXTEST acts as BYPASS
    load_ir(OP_EXTEST, cap);
    expect_v(active_instr, OP_EXTEST, "EXTEST loaded");
    expect_v(bsr_mode, 0, "masked EXTEST leaves pins functional");
    scan(0, 9, 64'h1FF, q);
    expect_v(q[8:0], 9'h1FE, "masked EXTEST path is the bypass bit");
    if (q[8:0] == 9'h1FE && !bsr_mode) n_masked++;
    load_ir(OP_CLAMP_HOLD, cap);
    idle(2);
    expect_v(tmp_status, 0, "masked CLAMP_HOLD does nothing");

    // 4. authentication: one refused attempt, then the right response
    load_ir(OP_AUTH_CHAL, cap);
    scan(0, 64, CHAL, q);
    expect_v(auth_busy, 1, "cipher running after Update-DR");
    idle(33);
    expect_v(auth_busy, 0, "cipher finished within 32 TCKs");
    load_ir(OP_AUTH_RESP, cap);
    scan(0, 64, ~RESP, q);
    expect_v(q[1:0], 2'b10, "status: cipher text ready, not authenticated");
    expect_v(authenticated, 0, "wrong response refused");
    if (!authenticated) n_auth_fail++;
    load_ir(OP_AUTH_CHAL, cap);
    scan(0, 64, CHAL, q);
    idle(33);
    load_ir(OP_AUTH_RESP, cap);
    scan(0, 64, RESP, q);
    expect_v(authenticated, 1, "right response accepted");
    if (authenticated) n_auth_ok++;

    // 5. EXTEST through the boundary register
    load_ir(OP_EXTEST, cap);
    expect_v(bsr_mode, 1, "EXTEST drives test mode");
    scan(0, 8, 64'h3C, q);
    expect_v(q[7:0], PINS, "boundary register captured the pins");
    expect_v(bsr_upd, 8'h3C, "boundary register updated");
    if (q[7:0] == PINS && bsr_upd == 8'h3C) n_extest++;

    // 6. CLAMP_HOLD: persistence across Test-Logic-Reset
    load_ir(OP_CLAMP_HOLD, cap);
    idle(1);
    expect_v(tmp_status, 1, "CLAMP_HOLD turns persistence on");
    repeat (5) clk_tms(1);
    #1 expect_v(tap_state, TLR, "in Test-Logic-Reset");
    expect_v({bsr_mode, bsr_reset_n}, 2'b11, "pins held in test mode in Test-Logic-Reset");
    if (bsr_mode && bsr_reset_n && tap_state == TLR) n_persist_tlr++;
    clk_tms(0);
    expect_v(authenticated, 1, "authentication survives Test-Logic-Reset");

    // 7. TMP status register: read {escape, tmp}, disable the escape
    load_ir(OP_TMP_STATUS, cap);
    scan(0, 2, 64'b00, q);
    expect_v(q[1:0], 2'b11, "TMP status {escape, on}");
    load_ir(OP_BYPASS, cap);
    idle(2);
    expect_v(tmp_status, 1, "BYPASS does not escape with escape bit clear");
    if (tmp_status) n_escape_blocked++;

    // 8. re-enable the escape, BYPASS escapes
    load_ir(OP_TMP_STATUS, cap);
    scan(0, 2, 64'b10, q);
    expect_v(q[1:0], 2'b01, "TMP status {escape off, on}");
    load_ir(OP_BYPASS, cap);
    expect_v(tmp_status, 0, "bypass escape");
    if (!tmp_status) n_escape++;

    // 9. CLAMP_HOLD then CLAMP_RELEASE
    load_ir(OP_CLAMP_HOLD, cap);
    idle(1);
    expect_v(tmp_status, 1, "on again");
    load_ir(OP_CLAMP_RELEASE, cap);
    idle(1);
    expect_v(tmp_status, 0, "CLAMP_RELEASE turns persistence off");
    if (!tmp_status) n_release++;
    load_ir(OP_BYPASS, cap);
    go_tlr();
    expect_v(bsr_mode, 0, "pins functional again");

    // 10. LOCK
    load_ir(OP_LOCK, cap);
    idle(1);
    expect_v(authenticated, 0, "LOCK clears authentication");
    if (!authenticated) n_lock++;
    load_ir(OP_EXTEST, cap);
    expect_v(bsr_mode, 0, "EXTEST masked again after LOCK");

    $display("mechanisms: states=%0d bypass=%0d masked=%0d auth_fail=%0d auth_ok=%0d extest=%0d",
             n_states_seen, n_bypass, n_masked, n_auth_fail, n_auth_ok, n_extest);
    $display("            persist_tlr=%0d escape_blocked=%0d escape=%0d release=%0d lock=%0d pause=%0d",
             n_persist_tlr, n_escape_blocked, n_escape, n_release, n_lock, n_pause);
    checks++;
    if (n_bypass == 0 || n_masked == 0 || n_auth_fail == 0 || n_auth_ok == 0 || n_extest == 0 ||
        n_persist_tlr == 0 || n_escape_blocked == 0 || n_escape == 0 || n_release == 0 ||
        n_lock == 0 || n_pause == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
