// aes_mix_columns: the MixColumns step as four independent 32-bit column
// units (column 0 in bits [127:96]). Combinational, zero latency.
// Four 32-bit column units match the published datapath.
module aes_mix_columns (
  input  logic [127:0] din,
  output logic [127:0] dout
);
  timeunit 1ps; timeprecision 1ps;
  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_mix_column u_col (.din(din[32*c +: 32]), .dout(dout[32*c +: 32]));
  end
endmodule
