// tap_fsm: the 16-state IEEE 1149.1 TAP controller.
//
// The state advances on every rising edge of TCK according to TMS; TRSTN (active
// low) forces Test-Logic-Reset asynchronously, and five TCKs with TMS high reach
// it from any state. The state register is 4 bits with the encoding and the
// next-state table of the design's functional table; all control outputs are
// Moore outputs decoded from the state (no output registers), as in that table:
//   clock_dr  in Capture-DR and Shift-DR     clock_ir  in Capture-IR and Shift-IR
//   shift_dr  in Shift-DR                    shift_ir  in Shift-IR
//   update_dr in Update-DR                   update_ir in Update-IR
//   reset_n   low only in Test-Logic-Reset   select    = state bit 3
//   enable    in Shift-DR and Shift-IR
// capture_dr/capture_ir (the Capture states alone) are added outputs that the
// data registers use to load their parallel values.
module tap_fsm
  import stap_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output tap_ctrl_t  ctrl
);

  tap_state_e next;

  always_comb begin
    unique case (state)
      TLR:        next = tms ? TLR      : RTI;
      RTI:        next = tms ? SEL_DR   : RTI;
      SEL_DR:     next = tms ? SEL_IR   : CAPTURE_DR;
      CAPTURE_DR: next = tms ? EXIT1_DR : SHIFT_DR;
      SHIFT_DR:   next = tms ? EXIT1_DR : SHIFT_DR;
      EXIT1_DR:   next = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   next = tms ? EXIT2_DR : PAUSE_DR;
      EXIT2_DR:   next = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  next = tms ? SEL_DR   : RTI;
      SEL_IR:     next = tms ? TLR      : CAPTURE_IR;
      CAPTURE_IR: next = tms ? EXIT1_IR : SHIFT_IR;
      SHIFT_IR:   next = tms ? EXIT1_IR : SHIFT_IR;
      EXIT1_IR:   next = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   next = tms ? EXIT2_IR : PAUSE_IR;
      EXIT2_IR:   next = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  next = tms ? SEL_DR   : RTI;
      default:    next = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n) state <= TLR;
    else         state <= next;

  always_comb begin
    ctrl            = '0;
    ctrl.capture_dr = (state == CAPTURE_DR);
    ctrl.clock_dr   = (state == CAPTURE_DR) || (state == SHIFT_DR);
    ctrl.shift_dr   = (state == SHIFT_DR);
    ctrl.update_dr  = (state == UPDATE_DR);
    ctrl.capture_ir = (state == CAPTURE_IR);
    ctrl.clock_ir   = (state == CAPTURE_IR) || (state == SHIFT_IR);
    ctrl.shift_ir   = (state == SHIFT_IR);
    ctrl.update_ir  = (state == UPDATE_IR);
    ctrl.reset_n    = (state != TLR);
    ctrl.select     = state[3];
    ctrl.enable     = (state == SHIFT_DR) || (state == SHIFT_IR);
  end

  // At most one capture, shift or update line is active at a time.
  a_one_action: assert property (@(posedge tck) disable iff (!trst_n)
    $onehot0({ctrl.capture_dr, ctrl.shift_dr, ctrl.update_dr,
              ctrl.capture_ir, ctrl.shift_ir, ctrl.update_ir}));

endmodule
