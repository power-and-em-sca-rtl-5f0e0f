// sync_2ff: two-flip-flop synchronizer for a single level signal crossing
// into the clk domain. Output follows the input after two to three clocks.
// A standard synchronizer; the published design does not describe its
// clock-domain crossings.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  timeunit 1ps; timeprecision 1ps;
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
  end
endmodule
