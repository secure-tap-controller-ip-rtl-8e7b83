// ip_core_waveforms_tb: replays, on the plain core (SECURE = 0, no
// authentication), the operations of the reference simulations of this IP
// core: the 40-bit TMS pattern through all TAP states (state trace checked
// against an independent model), an instruction scan loading BYPASS with TDI
// held high, a data scan through the bypass register with TDI high, and
// loading CLAMP_HOLD (1010), after which test-mode persistence holds the pins
// in test mode and keeps the boundary-register reset released, also through
// Test-Logic-Reset. It also checks that the authentication codes act as BYPASS.
module ip_core_waveforms_tb;
  import stap_pkg::*;

  logic tck = 0, tms = 1, tdi = 0, trst_n = 1, tap_por_n = 1;
  logic [79:0] device_key = '0;
  logic bsr_tdo = 0;
  logic tdo, tdo_en, bsr_capture, bsr_clock, bsr_shift, bsr_update, bsr_mode, bsr_reset_n;
  logic tmp_status, authenticated, auth_busy;
  tap_state_e tap_state;
  logic [3:0] active_instr;
  int checks = 0, failures = 0;

  secure_tap_top #(.SECURE(1'b0)) dut (.*);

  always #50 tck = ~tck;

  initial begin
    repeat (3000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_v(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  task automatic clk_tms(input logic t, input logic d = 0);
    @(negedge tck); tms = t; tdi = d;
    @(posedge tck);
    #1;
  endtask

  task automatic scan(input bit is_ir, input int n, input logic [63:0] din,
                      output logic [63:0] dout);
    clk_tms(1);
    if (is_ir) clk_tms(1);
    clk_tms(0);
    clk_tms(0);
    dout = '0;
    for (int i = 0; i < n; i++) begin
      @(negedge tck); tms = (i == n - 1); tdi = din[i];
      @(posedge tck); dout[i] = tdo;
      #1;
    end
    clk_tms(1);
    clk_tms(0);
  endtask

  // independent model: the standard's diagram with its own numbering
  int nx0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nx1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  logic [3:0] enc [16] = '{4'hF, 4'hC, 4'h7, 4'h6, 4'h2, 4'h1, 4'h3, 4'h0, 4'h5,
                           4'h4, 4'hE, 4'hA, 4'h9, 4'hB, 4'h8, 4'hD};

  localparam string PATTERN = "1011000100010000110001000010001000110011";

  initial begin
    logic [63:0] q;
    int ref_s;
    #10 tap_por_n = 0; trst_n = 0;
    #200 tap_por_n = 1; trst_n = 1;

    // TMS pattern
    ref_s = 0;
    for (int i = 0; i < PATTERN.len(); i++) begin
      clk_tms(PATTERN[i] == "1");
      ref_s = (PATTERN[i] == "1") ? nx1[ref_s] : nx0[ref_s];
      expect_v(tap_state, enc[ref_s], "state along the TMS pattern");
    end
    repeat (5) clk_tms(1);
    clk_tms(0);

    // instruction scan, TDI high: loads BYPASS, shifts out the capture value
    scan(1, 4, 64'hF, q);
    expect_v(q[3:0], 4'b0101, "IR capture value shifted out");
    expect_v(active_instr, 4'b1111, "BYPASS active");

    // data scan through bypass, TDI high
    scan(0, 8, 64'hFF, q);
    expect_v(q[7:0], 8'hFE, "bypass: 0 then the TDI ones");

    // CLAMP_HOLD without authentication on the plain core
    expect_v(tmp_status, 0, "persistence off before CLAMP_HOLD");
    scan(1, 4, 64'b1010, q);
    expect_v(active_instr, 4'b1010, "CLAMP_HOLD active");
    clk_tms(0);
    expect_v(tmp_status, 1, "CLAMP_HOLD sets persistence");
    expect_v({bsr_mode, bsr_reset_n}, 2'b11, "pins in test mode");
    repeat (5) clk_tms(1);
    expect_v(tap_state, TLR, "Test-Logic-Reset");
    expect_v(active_instr, 4'b1111, "BYPASS in Test-Logic-Reset");
    expect_v({tmp_status, bsr_mode, bsr_reset_n}, 3'b111, "persistence through Test-Logic-Reset");
    clk_tms(0);

    // authentication codes are plain bypass here
    scan(1, 4, 64'(OP_AUTH_CHAL), q);
    scan(0, 8, 64'hFF, q);
    expect_v(q[7:0], 8'hFE, "AUTH_CHAL acts as BYPASS on the plain core");
    expect_v({authenticated, auth_busy}, 2'b00, "no authentication logic");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
