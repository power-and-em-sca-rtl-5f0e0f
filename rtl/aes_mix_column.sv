// aes_mix_column: MixColumns for one 32-bit column (byte 0 in bits [31:24]).
// Multiplies the column by the circulant matrix {02,03,01,01} over GF(2^8)
// using xtime; combinational.
// Standard AES arithmetic; helper of aes_mix_columns.
module aes_mix_column
  import aes_pkg::*;
(
  input  logic [31:0] din,
  output logic [31:0] dout
);
  timeunit 1ps; timeprecision 1ps;
  logic [7:0] a0, a1, a2, a3;
  always_comb begin
    {a0, a1, a2, a3} = din;
    dout[31:24] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
    dout[23:16] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
    dout[15:8]  = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
    dout[7:0]   = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
  end
endmodule
