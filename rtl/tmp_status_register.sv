// tmp_status_register: the 2-bit TMP status data register.
//
// Selected by the TMP_STATUS instruction. In Capture-DR it loads
// {bypass_escape, tmp_status}; in Shift-DR it shifts right with TDI entering
// bit 1 and bit 0 feeding TDO; on the falling edge of TCK in Update-DR bit 1
// becomes the new bypass-escape bit, which lets the BYPASS instruction take the
// TMP controller out of Persistence-On. The power-on reset sets the escape bit
// to ESCAPE_RESET. The document gives the register and the escape bit; the bit
// layout, the write path and the reset value are this design's choice.
module tmp_status_register #(
  parameter bit ESCAPE_RESET = 1'b1
) (
  input  logic tck,
  input  logic tap_por_n,
  input  logic tdi,
  input  logic sel,
  input  logic capture_dr,
  input  logic shift_dr,
  input  logic update_dr,
  input  logic tmp_status,
  output logic tdo,
  output logic bypass_escape
);

  logic [1:0] sh;

  always_ff @(posedge tck or negedge tap_por_n)
    if (!tap_por_n)             sh <= '0;
    else if (sel && capture_dr) sh <= {bypass_escape, tmp_status};
    else if (sel && shift_dr)   sh <= {tdi, sh[1]};

  always_ff @(negedge tck or negedge tap_por_n)
    if (!tap_por_n)            bypass_escape <= ESCAPE_RESET;
    else if (sel && update_dr) bypass_escape <= sh[1];

  assign tdo = sh[0];

endmodule
