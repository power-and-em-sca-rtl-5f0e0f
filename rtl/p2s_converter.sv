// p2s_converter: parallel-to-serial converter for the ciphertext.
// load captures din; each clock with shift high moves the register left by
// one, so dout presents din MSB first, one bit per clock (dout is valid
// straight after the load edge). load has priority over shift. Zeros fill
// from the right.
// The converter and its 128-bit width follow the published chip; bit order
// and the load/shift interface are this design's choice.
module p2s_converter #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic             dout
);
  timeunit 1ps; timeprecision 1ps;
  logic [WIDTH-1:0] sr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr_q <= '0;
    else if (load)  sr_q <= din;
    else if (shift) sr_q <= {sr_q[WIDTH-2:0], 1'b0};
  end
  assign dout = sr_q[WIDTH-1];
endmodule
