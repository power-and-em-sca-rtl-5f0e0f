// aes_sbox: one AES S-box byte, combinational.
// Computes the GF(2^8) inverse followed by the FIPS-197 affine map (see
// aes_pkg). Used sixteen times by aes_sub_bytes. No clock; zero latency.
// The S-box construction is standard AES; the published design does not
// describe its S-box circuit.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] din,
  output logic [7:0] dout
);
  timeunit 1ps; timeprecision 1ps;
  always_comb dout = sbox(din);
endmodule
