// scan_chain: serial-in, parallel-out shift register through which the
// plaintext is loaded (128 bits by default). While scan_en is high, each
// rising clock shifts q left by one and enters scan_in at bit 0, so the
// first bit scanned in ends up in the MSB after WIDTH clocks. scan_out is
// the MSB, which allows chaining or read-back. The shift direction is this
// design's choice.
module scan_chain #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scan_en,
  input  logic             scan_in,
  output logic             scan_out,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps; timeprecision 1ps;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= {q[WIDTH-2:0], scan_in};
  end
  assign scan_out = q[WIDTH-1];
endmodule
