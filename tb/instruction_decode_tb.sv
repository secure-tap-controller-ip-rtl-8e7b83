// instruction_decode_tb: all 16 codes, authenticated and not, against a
// reference table written here: the register each code selects, its decode
// line, and the masking of everything but BYPASS and the authentication
// instructions while not authenticated.
module instruction_decode_tb;
  import stap_pkg::*;

  logic [3:0] instr;
  logic authenticated;
  decode_t dec;
  int checks = 0, failures = 0;

  instruction_decode dut (.instr, .authenticated, .dec);

  decode_t dec_plain;
  instruction_decode #(.SECURE(1'b0)) dut_plain (.instr, .authenticated, .dec(dec_plain));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++) begin
      for (int c = 0; c < 16; c++) begin
        logic [1:0] exp_sel;
        logic [8:0] exp_lines;  // extest sample clamp hold release bypass chal resp lock
        bit open;
        instr = 4'(c); authenticated = a[0];
        #1;
        open = a[0] || c == 15 || c == 4 || c == 5 || c == 6;
        exp_sel = 2'd0; exp_lines = '0;
        if (open) begin
          case (c)
            0:  begin exp_sel = 2'd1; exp_lines[8] = 1; end
            1:  begin exp_sel = 2'd1; exp_lines[7] = 1; end
            2:  exp_lines[6] = 1;
            10: exp_lines[5] = 1;
            9:  exp_lines[4] = 1;
            15: exp_lines[3] = 1;
            4:  begin exp_sel = 2'd3; exp_lines[2] = 1; end
            5:  begin exp_sel = 2'd3; exp_lines[1] = 1; end
            6:  exp_lines[0] = 1;
            12: exp_sel = 2'd2;
            default: ;
          endcase
        end
        checks++;
        if (dec.dr_sel !== exp_sel) begin
          failures++; $display("FAIL code %b auth %0d: dr_sel %0d expected %0d", c[3:0], a, dec.dr_sel, exp_sel);
        end
        checks++;
        if ({dec.extest, dec.sample, dec.clamp, dec.clamp_hold, dec.clamp_release, dec.bypass,
             dec.auth_chal, dec.auth_resp, dec.lock} !== exp_lines) begin
          failures++; $display("FAIL code %b auth %0d: decode lines", c[3:0], a);
        end
        // plain core: same as authenticated, except the authentication codes
        checks++;
        if (c == 4 || c == 5 || c == 6) begin
          if (dec_plain !== decode_t'(0)) begin failures++; $display("FAIL plain core code %b", c[3:0]); end
        end else if (a == 1 && dec_plain !== dec) begin
          failures++; $display("FAIL plain core code %b differs from authenticated decode", c[3:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
