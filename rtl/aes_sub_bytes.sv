// aes_sub_bytes: the SubBytes step, sixteen S-boxes side by side, one per
// byte of the 128-bit state (bits [127:120] are byte 0). Combinational,
// zero latency. The S-box is computed logic rather than a lookup table.
// Sixteen parallel S-boxes match the published datapath; computing the
// table instead of storing it is this design's choice.
module aes_sub_bytes (
  input  logic [127:0] din,
  output logic [127:0] dout
);
  timeunit 1ps; timeprecision 1ps;
  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (.din(din[8*i +: 8]), .dout(dout[8*i +: 8]));
  end
endmodule
