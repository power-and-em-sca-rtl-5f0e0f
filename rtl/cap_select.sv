// cap_select: selection logic for the enables i7..i0 of the slew capacitor
// bank (cap_en[7] = i7, the smallest capacitor).
// With scan_ctrl high the enables come straight from cap_scan, so any
// combination, including none (a sharp, unprotected clock), can be set.
// With scan_ctrl low, three random bits pick one capacitor (one-hot,
// rnd = 0 picks i7). Capacitors outside ALLOW_MASK are never picked at
// random; such a pick falls back to i7. The default mask keeps the random
// load at or below 870 fF so that the clock still reaches its switching
// point at speed. Combinational.
// The choice between scan control and an LFSR, and the 870 fF ceiling,
// follow the published design; the one-hot random pick and the fallback
// are this design's choices.
module cap_select #(
  parameter logic [7:0] ALLOW_MASK = 8'hF8
) (
  input  logic       scan_ctrl,
  input  logic [7:0] cap_scan,
  input  logic [2:0] rnd,
  output logic [7:0] cap_en
);
  timeunit 1ps; timeprecision 1ps;
  logic [7:0] pick;
  always_comb begin
    pick = 8'h80 >> rnd;
    if ((pick & ALLOW_MASK) == '0) pick = 8'h80;
    cap_en = scan_ctrl ? cap_scan : pick;
  end
endmodule
