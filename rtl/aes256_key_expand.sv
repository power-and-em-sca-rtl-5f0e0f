// aes256_key_expand: on-the-fly AES-256 key schedule.
// A 256-bit register holds eight consecutive schedule words w[8j..8j+7]
// (w[8j] in bits [255:224]). `load` puts the cipher key in it (j = 0);
// `advance` replaces it with the next eight words, following FIPS-197:
// the first word uses SubWord(RotWord(w7)) ^ Rcon, the fifth uses SubWord of
// the fourth, the others a plain XOR chain. Rcon starts at 01 and is doubled
// in GF(2^8) at each advance. The 128-bit round key is the upper half of the
// register (even rounds) or the lower half (sel_low, odd rounds), so round
// key 2j+1 is used and the register advanced in the same clock.
// Timing: load/advance take effect at the next rising clock edge; round_key
// is combinational from the register.
module aes256_key_expand
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [255:0] key,
  input  logic         advance,
  input  logic         sel_low,
  output logic [127:0] round_key
);
  timeunit 1ps; timeprecision 1ps;

  logic [255:0] kreg_q, knext;
  logic [7:0]   rcon_q;

  always_comb begin
    logic [31:0] w [8];
    logic [31:0] n [8];
    for (int i = 0; i < 8; i++) w[i] = kreg_q[255 - 32*i -: 32];
    n[0] = w[0] ^ sub_word(rot_word(w[7])) ^ {rcon_q, 24'h0};
    n[1] = w[1] ^ n[0];
    n[2] = w[2] ^ n[1];
    n[3] = w[3] ^ n[2];
    n[4] = w[4] ^ sub_word(n[3]);
    n[5] = w[5] ^ n[4];
    n[6] = w[6] ^ n[5];
    n[7] = w[7] ^ n[6];
    for (int i = 0; i < 8; i++) knext[255 - 32*i -: 32] = n[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kreg_q <= '0;
      rcon_q <= 8'h01;
    end else if (load) begin
      kreg_q <= key;
      rcon_q <= 8'h01;
    end else if (advance) begin
      kreg_q <= knext;
      rcon_q <= xtime(rcon_q);
    end
  end

  assign round_key = sel_low ? kreg_q[127:0] : kreg_q[255:128];
endmodule
