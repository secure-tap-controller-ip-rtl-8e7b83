// tmp_controller: the optional 1149.1-2013 test-mode-persistence controller.
//
// A two-state machine, one flip-flop clocked by TCK. Persistence-Off is entered
// by the power-on reset TAP_POR* (asynchronous, active low). While CLAMP_HOLD is
// the active instruction the next TCK enters Persistence-On; while CLAMP_RELEASE
// is active the next TCK returns to Persistence-Off, as does the bypass escape:
// Update-IR with BYPASS as the new instruction while the bypass-escape bit of
// the TMP status register is set. tmp_status is the state (1 = on).
// chreset_n, the reset of the boundary register, follows the TAP reset (low in
// Test-Logic-Reset) but is held high while persistence is on, so the pins stay
// in test mode across Test-Logic-Reset. The states, transitions and signals are
// those of the document; only the power-on reset clears the state (TRSTN does
// not), which is this design's reading of the standard.
module tmp_controller (
  input  logic tck,
  input  logic tap_por_n,
  input  logic clamp_hold_dec,
  input  logic clamp_release_dec,
  input  logic bypass_dec,
  input  logic update_ir,
  input  logic reset_n,
  input  logic bypass_escape,
  output logic chreset_n,
  output logic tmp_status
);

  logic escape;
  logic tmp_next;

  assign escape   = update_ir && bypass_dec && bypass_escape;
  assign tmp_next = (tmp_status || clamp_hold_dec) && !clamp_release_dec && !escape;

  always_ff @(posedge tck or negedge tap_por_n)
    if (!tap_por_n) tmp_status <= 1'b0;
    else            tmp_status <= tmp_next;

  assign chreset_n = reset_n || tmp_status;

  // Persistence-On is entered only through CLAMP_HOLD.
  a_on_by_clamp_hold: assert property (@(posedge tck) disable iff (!tap_por_n)
    $rose(tmp_status) |-> $past(clamp_hold_dec));

endmodule
