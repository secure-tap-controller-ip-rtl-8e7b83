// secure_tap_top: IEEE 1149.1-2013 TAP controller IP core with test-mode
// persistence and challenge-response authentication.
//
// Blocks: the TAP state machine, a 4-bit instruction register and its decoder,
// the bypass register, the TMP controller and TMP status register, the control
// of an external boundary-scan register, the authentication module (LBlock
// cipher, cipher text register, comparator) and the TDO multiplexer. Everything
// runs on TCK. TRSTN and the power-on reset TAP_POR* both reset the TAP side;
// only TAP_POR* resets the TMP controller and the authentication state.
// The boundary register is not part of the core: its serial output comes in on
// bsr_tdo and its controls go out on the bsr_* ports; device_key is the 80-bit
// secret key of the device (e.g. from fuses). tdo changes on the falling edge
// of TCK and tdo_en is the TDO pad's output enable.
// SECURE = 1 (default) builds the secure core; SECURE = 0 builds the plain
// IEEE 1149.1-2013 core without the authentication module, in which every test
// instruction is open and authenticated/auth_busy stay low.
// The block structure follows the document's architecture figure; the wiring
// details named in each block are this design's where the document is silent.
module secure_tap_top
  import stap_pkg::*;
#(
  parameter bit SECURE = 1'b1
) (
  input  logic              tck,
  input  logic              tms,
  input  logic              tdi,
  input  logic              trst_n,
  input  logic              tap_por_n,
  input  logic [LB_KEY-1:0] device_key,
  input  logic              bsr_tdo,
  output logic              tdo,
  output logic              tdo_en,
  output logic              bsr_capture,
  output logic              bsr_clock,
  output logic              bsr_shift,
  output logic              bsr_update,
  output logic              bsr_mode,
  output logic              bsr_reset_n,
  output logic              tmp_status,
  output logic              authenticated,
  output logic              auth_busy,
  output tap_state_e        tap_state,
  output logic [IR_WIDTH-1:0] active_instr
);

  logic      tap_rst_n;
  tap_ctrl_t ctrl;
  decode_t   dec;
  logic      ir_tdo, bypass_tdo, tmp_tdo, auth_tdo;
  logic      chreset_n, bypass_escape;

  assign tap_rst_n = trst_n && tap_por_n;

  tap_fsm u_tap_fsm (
    .tck    (tck),
    .trst_n (tap_rst_n),
    .tms    (tms),
    .state  (tap_state),
    .ctrl   (ctrl)
  );

  instruction_register u_ir (
    .tck      (tck),
    .trst_n   (tap_rst_n),
    .tdi      (tdi),
    .ctrl     (ctrl),
    .ir_shift (),
    .ir_latch (active_instr),
    .ir_tdo   (ir_tdo)
  );

  instruction_decode #(.SECURE(SECURE)) u_decode (
    .instr         (active_instr),
    .authenticated (authenticated),
    .dec           (dec)
  );

  bypass_register u_bypass (
    .tck        (tck),
    .trst_n     (tap_rst_n),
    .tdi        (tdi),
    .sel        (dec.dr_sel == DR_BYPASS),
    .capture_dr (ctrl.capture_dr),
    .shift_dr   (ctrl.shift_dr),
    .tdo        (bypass_tdo)
  );

  tmp_controller u_tmpc (
    .tck               (tck),
    .tap_por_n         (tap_por_n),
    .clamp_hold_dec    (dec.clamp_hold),
    .clamp_release_dec (dec.clamp_release),
    .bypass_dec        (dec.bypass),
    .update_ir         (ctrl.update_ir),
    .reset_n           (ctrl.reset_n),
    .bypass_escape     (bypass_escape),
    .chreset_n         (chreset_n),
    .tmp_status        (tmp_status)
  );

  tmp_status_register u_tmp_status (
    .tck           (tck),
    .tap_por_n     (tap_por_n),
    .tdi           (tdi),
    .sel           (dec.dr_sel == DR_TMP),
    .capture_dr    (ctrl.capture_dr),
    .shift_dr      (ctrl.shift_dr),
    .update_dr     (ctrl.update_dr),
    .tmp_status    (tmp_status),
    .tdo           (tmp_tdo),
    .bypass_escape (bypass_escape)
  );

  bsr_control u_bsr_control (
    .ctrl        (ctrl),
    .dec         (dec),
    .tmp_status  (tmp_status),
    .chreset_n   (chreset_n),
    .bsr_capture (bsr_capture),
    .bsr_clock   (bsr_clock),
    .bsr_shift   (bsr_shift),
    .bsr_update  (bsr_update),
    .bsr_mode    (bsr_mode),
    .bsr_reset_n (bsr_reset_n)
  );

  if (SECURE) begin : g_auth
    auth_module u_auth (
      .tck           (tck),
      .tap_por_n     (tap_por_n),
      .tdi           (tdi),
      .ctrl          (ctrl),
      .dec           (dec),
      .device_key    (device_key),
      .tdo           (auth_tdo),
      .authenticated (authenticated),
      .cipher_busy   (auth_busy)
    );
  end else begin : g_no_auth
    assign auth_tdo      = 1'b0;
    assign authenticated = 1'b0;
    assign auth_busy     = 1'b0;
  end

  register_select u_select (
    .tck        (tck),
    .trst_n     (tap_rst_n),
    .select     (ctrl.select),
    .enable     (ctrl.enable),
    .dr_sel     (dec.dr_sel),
    .ir_tdo     (ir_tdo),
    .bypass_tdo (bypass_tdo),
    .bsr_tdo    (bsr_tdo),
    .tmp_tdo    (tmp_tdo),
    .auth_tdo   (auth_tdo),
    .tdo        (tdo),
    .tdo_en     (tdo_en)
  );

endmodule
