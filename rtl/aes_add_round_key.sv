// aes_add_round_key: AddRoundKey, the bitwise XOR of the 128-bit state with
// the 128-bit round key. Combinational, zero latency.
// The step and its 128-bit width follow the published datapath.
module aes_add_round_key (
  input  logic [127:0] state,
  input  logic [127:0] round_key,
  output logic [127:0] dout
);
  timeunit 1ps; timeprecision 1ps;
  always_comb dout = state ^ round_key;
endmodule
