// stap_pkg: types and constants shared by the secure TAP controller.
//
// The TAP state encoding is the one of the functional table of the design
// (Test-Logic-Reset = F, Run-Test/Idle = C, ..., Update-IR = D); it is the
// classic 1149.1 example encoding in which bit 3 doubles as the SELECT output.
// The 4-bit instruction codes are this design's own choice except BYPASS
// (all ones, as 1149.1 requires) and CLAMP_HOLD (1010). Instructions not listed
// decode as BYPASS. The LBlock S-boxes are those of the published LBlock cipher.
package stap_pkg;

  typedef enum logic [3:0] {
    TLR        = 4'hF,  // Test-Logic-Reset
    RTI        = 4'hC,  // Run-Test/Idle
    SEL_DR     = 4'h7,
    CAPTURE_DR = 4'h6,
    SHIFT_DR   = 4'h2,
    EXIT1_DR   = 4'h1,
    PAUSE_DR   = 4'h3,
    EXIT2_DR   = 4'h0,
    UPDATE_DR  = 4'h5,
    SEL_IR     = 4'h4,
    CAPTURE_IR = 4'hE,
    SHIFT_IR   = 4'hA,
    EXIT1_IR   = 4'h9,
    PAUSE_IR   = 4'hB,
    EXIT2_IR   = 4'h8,
    UPDATE_IR  = 4'hD
  } tap_state_e;

  localparam int unsigned IR_WIDTH = 4;

  typedef enum logic [IR_WIDTH-1:0] {
    OP_EXTEST        = 4'b0000,
    OP_SAMPLE        = 4'b0001,
    OP_CLAMP         = 4'b0010,
    OP_AUTH_CHAL     = 4'b0100,
    OP_AUTH_RESP     = 4'b0101,
    OP_LOCK          = 4'b0110,
    OP_CLAMP_RELEASE = 4'b1001,
    OP_CLAMP_HOLD    = 4'b1010,
    OP_TMP_STATUS    = 4'b1100,
    OP_BYPASS        = 4'b1111
  } opcode_e;

  // Which data register sits between TDI and TDO.
  typedef enum logic [1:0] {
    DR_BYPASS = 2'd0,
    DR_BSR    = 2'd1,
    DR_TMP    = 2'd2,
    DR_AUTH   = 2'd3
  } dr_sel_e;

  // Control signals produced by the TAP FSM (Moore outputs of the table).
  typedef struct packed {
    logic clock_dr;   // Capture-DR, Shift-DR
    logic shift_dr;
    logic update_dr;
    logic capture_dr;
    logic clock_ir;   // Capture-IR, Shift-IR
    logic shift_ir;
    logic update_ir;
    logic capture_ir;
    logic reset_n;    // low only in Test-Logic-Reset
    logic select;     // 1 = instruction path, 0 = data path
    logic enable;     // TDO driven (shift states)
  } tap_ctrl_t;

  // Decoded active instruction.
  typedef struct packed {
    dr_sel_e dr_sel;
    logic    extest;
    logic    sample;
    logic    clamp;
    logic    clamp_hold;
    logic    clamp_release;
    logic    bypass;        // the BYPASS opcode itself is active
    logic    auth_chal;
    logic    auth_resp;
    logic    lock;
  } decode_t;

  localparam int unsigned LB_BLOCK  = 64;
  localparam int unsigned LB_KEY    = 80;
  localparam int unsigned LB_ROUNDS = 32;

  function automatic logic [3:0] lb_sbox(input int unsigned idx, input logic [3:0] x);
    logic [63:0] t;
    case (idx)
      0: t = 64'hE9F0D4AB128376C5;
      1: t = 64'h4BE9FD0A7C562813;
      2: t = 64'h1E7CFD06B593248A;
      3: t = 64'h768B0F3E9ACD5241;
      4: t = 64'hE5F072CD1849BA63;
      5: t = 64'h2DBCFE097A631845;
      6: t = 64'hB94E0FAD6C573812;
      7: t = 64'hDAF0E49B218375C6;
      8: t = 64'h87E5FD06BC9A2413;
      default: t = 64'hB5F0729D481CEA36;
    endcase
    return t[63 - 4*x -: 4];
  endfunction

endpackage
