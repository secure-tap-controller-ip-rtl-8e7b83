// bypass_register: the one-bit 1149.1 bypass data register.
//
// When selected it loads 0 in Capture-DR and takes TDI in Shift-DR, so a
// bypassed device adds one TCK of delay between TDI and TDO. It has no update
// stage. Cleared by TRSTN. Follows the standard; the document only names it.
module bypass_register (
  input  logic tck,
  input  logic trst_n,
  input  logic tdi,
  input  logic sel,
  input  logic capture_dr,
  input  logic shift_dr,
  output logic tdo
);

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)                tdo <= 1'b0;
    else if (sel && capture_dr) tdo <= 1'b0;
    else if (sel && shift_dr)   tdo <= tdi;

endmodule
