// freq_divider: coarse clock-frequency randomization.
// Three toggle flip-flops in a ripple chain divide the incoming clock by 2,
// 4 and 8 (each T-FF is clocked by the output of the one before). A 4:1
// multiplexer, steered by random bits, forwards the undivided clock or one of
// the three divided clocks. It is a plain clock mux: a change of sel can
// produce one short clock phase, so the critical path must be met at the
// undivided ring-oscillator frequency.
// The three T-FFs and the TRNG-driven mux follow the published circuit; the
// ripple arrangement and the 4-input mux are this design's reading of it.
module freq_divider (
  input  logic       clk_in,
  input  logic       rst_n,
  input  logic [1:0] sel,
  output logic       clk_out
);
  timeunit 1ps; timeprecision 1ps;
  logic t0, t1, t2;

  always_ff @(posedge clk_in or negedge rst_n)
    if (!rst_n) t0 <= 1'b0; else t0 <= ~t0;
  always_ff @(posedge t0 or negedge rst_n)
    if (!rst_n) t1 <= 1'b0; else t1 <= ~t1;
  always_ff @(posedge t1 or negedge rst_n)
    if (!rst_n) t2 <= 1'b0; else t2 <= ~t2;

  always_comb begin
    unique case (sel)
      2'd0:    clk_out = clk_in;
      2'd1:    clk_out = t0;
      2'd2:    clk_out = t1;
      default: clk_out = t2;
    endcase
  end
endmodule
