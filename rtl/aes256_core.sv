// aes256_core: iterative AES-256 encryption, one round per clock on a
// 128-bit datapath.
// The loop runs from the state register through AddRoundKey, SubBytes,
// ShiftRows and MixColumns back to the register; in the last round a
// multiplexer bypasses MixColumns. Because AddRoundKey sits at the register
// output, the final key addition is the same AddRoundKey instance acting on
// the register after the last round, and its output is the ciphertext.
// Hence the register changes from the round-13 to the round-14 value on the
// fourteenth round clock. The key schedule runs on the fly beside it.
// Timing: start (while idle) loads plaintext and key; the 14 round clocks
// follow, and done rises 15 clocks after the start edge. ciphertext is valid
// while done is high and until the next start. trigger is high during the
// round clocks and is meant for aligning measured traces.
// The loop order, the last-round bypass and the trigger from the round
// counter follow the published architecture; the latency and handshake are
// this design's own choices.
module aes256_core
  import aes_pkg::*;
#(
  parameter int unsigned NR = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] plaintext,
  input  logic [255:0] key,
  output logic [127:0] ciphertext,
  output logic         busy,
  output logic         done,
  output logic         trigger
);
  timeunit 1ps; timeprecision 1ps;

  logic [127:0] state_q, ark_out, sb_out, sr_out, mc_out, round_out, round_key;
  logic [$clog2(NR)-1:0] round;
  logic last_round, load;

  assign load = start && !busy;

  aes_round_counter #(.NR(NR)) u_cnt (
    .clk, .rst_n, .start, .round, .busy, .last_round, .done
  );

  aes256_key_expand u_key (
    .clk, .rst_n, .load, .key,
    .advance  (busy && round[0]),
    .sel_low  (busy && round[0]),
    .round_key
  );

  aes_add_round_key u_ark (.state(state_q), .round_key, .dout(ark_out));
  aes_sub_bytes     u_sb  (.din(ark_out), .dout(sb_out));
  aes_shift_rows    u_sr  (.din(sb_out),  .dout(sr_out));
  aes_mix_columns   u_mc  (.din(sr_out),  .dout(mc_out));

  assign round_out = last_round ? sr_out : mc_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state_q <= '0;
    else if (load)  state_q <= plaintext;
    else if (busy)  state_q <= round_out;
  end

  assign ciphertext = ark_out;
  assign trigger    = busy;
endmodule
