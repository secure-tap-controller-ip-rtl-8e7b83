// bsr_control_tb: random control and decode inputs against a reference written
// here: boundary-register controls pass only when EXTEST or SAMPLE selects it,
// and the mode line follows the clamp/test instructions or TMP persistence.
module bsr_control_tb;
  import stap_pkg::*;

  tap_ctrl_t ctrl;
  decode_t   dec;
  logic tmp_status, chreset_n;
  logic bsr_capture, bsr_clock, bsr_shift, bsr_update, bsr_mode, bsr_reset_n;
  int checks = 0, failures = 0;

  bsr_control dut (.ctrl, .dec, .tmp_status, .chreset_n, .bsr_capture, .bsr_clock,
                   .bsr_shift, .bsr_update, .bsr_mode, .bsr_reset_n);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_sel = 0, n_mode = 0;
    for (int k = 0; k < 2000; k++) begin
      logic bsr_on, mode;
      ctrl = tap_ctrl_t'($urandom);
      dec  = '0;
      case ($urandom_range(0, 6))
        0: begin dec.extest = 1; dec.dr_sel = DR_BSR; end
        1: begin dec.sample = 1; dec.dr_sel = DR_BSR; end
        2: dec.clamp = 1;
        3: dec.clamp_hold = 1;
        4: dec.clamp_release = 1;
        5: begin dec.bypass = 1; dec.dr_sel = DR_BYPASS; end
        default: begin dec.auth_chal = 1; dec.dr_sel = DR_AUTH; end
      endcase
      tmp_status = ($urandom_range(0, 3) == 0);
      chreset_n  = 1'($urandom);
      #1;
      bsr_on = dec.extest || dec.sample;
      mode   = dec.extest || dec.clamp || dec.clamp_hold || dec.clamp_release || tmp_status;
      n_sel += bsr_on; n_mode += mode;
      checks++;
      if ({bsr_capture, bsr_clock, bsr_shift, bsr_update} !==
          {bsr_on && ctrl.capture_dr, bsr_on && ctrl.clock_dr, bsr_on && ctrl.shift_dr,
           bsr_on && ctrl.update_dr}) begin
        failures++; $display("FAIL control gating");
      end
      checks++;
      if (bsr_mode !== mode || bsr_reset_n !== chreset_n) begin
        failures++; $display("FAIL mode/reset");
      end
    end
    checks++;
    if (n_sel == 0 || n_mode == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
