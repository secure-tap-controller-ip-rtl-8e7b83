// instruction_decode: turns the active instruction into register selects and
// the decode lines of the TMP controller and the boundary-register control.
//
// Purely combinational. While the core is not authenticated only BYPASS and
// the authentication instructions (AUTH_CHAL, AUTH_RESP, LOCK) take effect; any
// other code acts as BYPASS, so an unauthenticated device simply bypasses data.
// Codes that are not instructions also act as BYPASS. With SECURE = 0 (the
// plain IP core, no authentication module) every test instruction is open and
// the authentication codes act as BYPASS. The gating follows the
// document's security scheme; the opcode values (see stap_pkg) are this
// design's own except BYPASS and CLAMP_HOLD.
module instruction_decode
  import stap_pkg::*;
#(
  parameter bit SECURE = 1'b1
) (
  input  logic [IR_WIDTH-1:0] instr,
  input  logic                authenticated,
  output decode_t             dec
);

  logic allowed;
  logic auth_op;

  always_comb begin
    auth_op = instr inside {OP_AUTH_CHAL, OP_AUTH_RESP, OP_LOCK};
    if (SECURE) allowed = authenticated || auth_op || (instr == OP_BYPASS);
    else        allowed = !auth_op;
    dec        = '0;
    dec.dr_sel = DR_BYPASS;
    if (allowed) begin
      unique case (instr)
        OP_EXTEST:        begin dec.extest = 1'b1;        dec.dr_sel = DR_BSR;  end
        OP_SAMPLE:        begin dec.sample = 1'b1;        dec.dr_sel = DR_BSR;  end
        OP_CLAMP:         dec.clamp = 1'b1;
        OP_CLAMP_HOLD:    dec.clamp_hold = 1'b1;
        OP_CLAMP_RELEASE: dec.clamp_release = 1'b1;
        OP_TMP_STATUS:    dec.dr_sel = DR_TMP;
        OP_AUTH_CHAL:     begin dec.auth_chal = 1'b1;     dec.dr_sel = DR_AUTH; end
        OP_AUTH_RESP:     begin dec.auth_resp = 1'b1;     dec.dr_sel = DR_AUTH; end
        OP_LOCK:          dec.lock = 1'b1;
        OP_BYPASS:        dec.bypass = 1'b1;
        default:          ;
      endcase
    end
  end

endmodule
