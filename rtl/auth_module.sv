// auth_module: challenge-response authentication of the secure TAP.
//
// A 64-bit authentication data register lies between TDI and TDO under the
// AUTH_CHAL and AUTH_RESP instructions (shift right, TDI into bit 63, bit 0 to
// TDO). The protocol:
//   1. AUTH_CHAL: the tester shifts in a 64-bit challenge taken from its
//      challenge-response pair (CRP) list. Update-DR starts the LBlock core,
//      which encrypts the challenge under the device key in 32 TCK cycles
//      (the tester keeps TCK running, e.g. in Run-Test/Idle).
//   2. The result is kept in the cipher text register inside the core.
//   3. AUTH_RESP: the tester shifts in the response of its CRP. On Update-DR the
//      comparator checks it against the cipher text register; a match sets the
//      authenticated flag, a mismatch clears it. Each cipher text can be used
//      for one comparison only, so every attempt needs a fresh challenge.
// An Update-DR of AUTH_CHAL while the cipher is still busy is ignored.
// Capture-DR under either instruction loads the status
// {62'b0, cipher text ready, authenticated}, which the tester reads back.
// The LOCK instruction clears the flag on every TCK while it is active, and the
// power-on reset clears it; TRSTN and Test-Logic-Reset do not.
// The document gives the LBlock cipher, the cipher text register, the
// comparator and the five protocol steps; the register layout, the status word
// and the one-comparison rule are this design's own choices.
module auth_module
  import stap_pkg::*;
(
  input  logic              tck,
  input  logic              tap_por_n,
  input  logic              tdi,
  input  tap_ctrl_t         ctrl,
  input  decode_t           dec,
  input  logic [LB_KEY-1:0] device_key,
  output logic              tdo,
  output logic              authenticated,
  output logic              cipher_busy
);

  logic [LB_BLOCK-1:0] sh;
  logic [LB_BLOCK-1:0] cipher_q;
  logic                cipher_valid;
  logic                sel;
  logic                start;
  logic                lb_done;
  logic [LB_BLOCK-1:0] lb_ct;

  assign sel   = dec.auth_chal || dec.auth_resp;
  assign start = dec.auth_chal && ctrl.update_dr;

  lblock u_lblock (
    .clk        (tck),
    .rst_n      (tap_por_n),
    .start      (start),
    .plaintext  (sh),
    .key        (device_key),
    .busy       (cipher_busy),
    .done       (lb_done),
    .ciphertext (lb_ct)
  );

  always_ff @(posedge tck or negedge tap_por_n)
    if (!tap_por_n)                  sh <= '0;
    else if (sel && ctrl.capture_dr) sh <= {62'b0, cipher_valid, authenticated};
    else if (sel && ctrl.shift_dr)   sh <= {tdi, sh[LB_BLOCK-1:1]};

  always_ff @(posedge tck or negedge tap_por_n)
    if (!tap_por_n) begin
      cipher_q      <= '0;
      cipher_valid  <= 1'b0;
      authenticated <= 1'b0;
    end else begin
      if (lb_done) begin
        cipher_q     <= lb_ct;
        cipher_valid <= 1'b1;
      end else if (start) begin
        cipher_valid <= 1'b0;
      end
      if (dec.lock) begin
        authenticated <= 1'b0;
      end else if (dec.auth_resp && ctrl.update_dr) begin
        authenticated <= cipher_valid && (sh == cipher_q);
        cipher_valid  <= 1'b0;
      end
    end

  assign tdo = sh[0];

  // The flag may only rise on Update-DR of AUTH_RESP with a fresh cipher text.
  a_auth_rise: assert property (@(posedge tck) disable iff (!tap_por_n)
    $rose(authenticated) |-> $past(dec.auth_resp && ctrl.update_dr && cipher_valid));

endmodule
