// instruction_register: the 4-bit TAP instruction register.
//
// It has a shift stage and a parallel (latched) stage. In Capture-IR the shift
// stage loads CAPTURE_VALUE, whose two low bits must be 01 as 1149.1 requires;
// in Shift-IR it shifts right, TDI entering bit 3 and bit 0 feeding TDO. The
// latched stage, which holds the active instruction, takes the shift stage on
// the falling edge of TCK in Update-IR and is forced to BYPASS (1111) in
// Test-Logic-Reset and by TRSTN, since no device identification register is
// built. The falling-edge update is this design's choice (the 1149.1 timing);
// the width, the 01 capture and the BYPASS reset value follow the document.
module instruction_register
  import stap_pkg::*;
#(
  parameter logic [IR_WIDTH-1:0] CAPTURE_VALUE = 4'b0101
) (
  input  logic                tck,
  input  logic                trst_n,
  input  logic                tdi,
  input  tap_ctrl_t           ctrl,
  output logic [IR_WIDTH-1:0] ir_shift,
  output logic [IR_WIDTH-1:0] ir_latch,
  output logic                ir_tdo
);

  if (CAPTURE_VALUE[1:0] != 2'b01) begin : g_bad_capture
    $error("instruction register capture value must end in 01");
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)              ir_shift <= CAPTURE_VALUE;
    else if (ctrl.capture_ir) ir_shift <= CAPTURE_VALUE;
    else if (ctrl.shift_ir)   ir_shift <= {tdi, ir_shift[IR_WIDTH-1:1]};

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n)             ir_latch <= OP_BYPASS;
    else if (!ctrl.reset_n)  ir_latch <= OP_BYPASS;
    else if (ctrl.update_ir) ir_latch <= ir_shift;

  assign ir_tdo = ir_shift[0];

endmodule
