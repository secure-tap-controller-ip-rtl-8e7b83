// register_select: the TDO multiplexer and output stage.
//
// SELECT (high in the instruction-scan states, Test-Logic-Reset and
// Run-Test/Idle) picks the instruction register; otherwise the data register
// named by the active instruction is picked. The chosen bit is registered on the
// falling edge of TCK, as is ENABLE, so TDO changes half a cycle after the
// rising edge on which TDI is sampled, and tdo_en (the output-enable of the TDO
// pad) is high exactly while a Shift state is being clocked out. TRSTN clears
// both. The falling-edge drive follows the document; the mux is this design's.
module register_select
  import stap_pkg::*;
(
  input  logic    tck,
  input  logic    trst_n,
  input  logic    select,
  input  logic    enable,
  input  dr_sel_e dr_sel,
  input  logic    ir_tdo,
  input  logic    bypass_tdo,
  input  logic    bsr_tdo,
  input  logic    tmp_tdo,
  input  logic    auth_tdo,
  output logic    tdo,
  output logic    tdo_en
);

  logic dr_tdo;

  always_comb
    unique case (dr_sel)
      DR_BYPASS: dr_tdo = bypass_tdo;
      DR_BSR:    dr_tdo = bsr_tdo;
      DR_TMP:    dr_tdo = tmp_tdo;
      DR_AUTH:   dr_tdo = auth_tdo;
      default:   dr_tdo = bypass_tdo;
    endcase

  always_ff @(negedge tck or negedge trst_n)
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= select ? ir_tdo : dr_tdo;
      tdo_en <= enable;
    end

endmodule
