// aes_shift_rows: the ShiftRows step. The state is column-major with byte 0
// in bits [127:120]; byte (row r, column c) sits at index 4c+r. Row r is
// rotated left by r columns: out(r,c) = in(r, (c+r) mod 4). Pure wiring.
// The step is part of the published round datapath; the byte order
// (FIPS-197) is this design's choice. Being a fixed permutation, it
// synthesizes to wires only.
module aes_shift_rows (
  input  logic [127:0] din,
  output logic [127:0] dout
);
  timeunit 1ps; timeprecision 1ps;
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        dout[127 - 8*(4*c + r) -: 8] = din[127 - 8*(4*((c + r) % 4) + r) -: 8];
  end
endmodule
