// freq_generator: random clock source for the AES core.
// Fine randomization: a tunable ring oscillator whose length is set by the
// low three bits of an LFSR; the LFSR is clocked by the oscillator itself, so
// the length changes every oscillator period, and a TRNG bit is mixed into its
// feedback. Coarse randomization: the oscillator output is divided by 1, 2, 4
// or 8 as chosen by two further TRNG bits.
// Interface: trng[0] seeds the LFSR, trng[2:1] choose the division. The output
// is low while ro_en is low. The ring oscillator is a behavioural model, so
// this block simulates but synthesizes only around it.
module freq_generator (
  input  logic       rst_n,
  input  logic       ro_en,
  input  logic [2:0] trng,
  output logic       clk_out
);
  timeunit 1ps; timeprecision 1ps;
  logic        ro_clk;
  logic [15:0] rnd;

  tunable_ro u_ro (.en(ro_en), .sel(rnd[2:0]), .ro_out(ro_clk));

  lfsr u_lfsr (.clk(ro_clk), .rst_n, .seed_in(trng[0]), .q(rnd));

  freq_divider u_div (.clk_in(ro_clk), .rst_n, .sel(trng[2:1]), .clk_out);
endmodule
