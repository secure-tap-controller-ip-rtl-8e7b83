// bsr_control: control of the external boundary-scan register.
//
// The boundary register itself lies outside this core. This block passes the
// data-register controls (capture, clock, shift, update) on to it only while
// an instruction that selects it (EXTEST, SAMPLE/PRELOAD) is active, and drives
// its mode line: the pins are in test mode under EXTEST, CLAMP, CLAMP_HOLD or
// CLAMP_RELEASE, and whenever the TMP controller is in Persistence-On whatever
// the instruction. bsr_reset_n is the TMP controller's CHReset*. Combinational.
// The document names this block only; its contents are this design's choice.
module bsr_control
  import stap_pkg::*;
(
  input  tap_ctrl_t ctrl,
  input  decode_t   dec,
  input  logic      tmp_status,
  input  logic      chreset_n,
  output logic      bsr_capture,
  output logic      bsr_clock,
  output logic      bsr_shift,
  output logic      bsr_update,
  output logic      bsr_mode,
  output logic      bsr_reset_n
);

  logic sel;

  assign sel         = (dec.dr_sel == DR_BSR);
  assign bsr_capture = sel && ctrl.capture_dr;
  assign bsr_clock   = sel && ctrl.clock_dr;
  assign bsr_shift   = sel && ctrl.shift_dr;
  assign bsr_update  = sel && ctrl.update_dr;
  assign bsr_mode    = dec.extest || dec.clamp || dec.clamp_hold ||
                       dec.clamp_release || tmp_status;
  assign bsr_reset_n = chreset_n;

endmodule
