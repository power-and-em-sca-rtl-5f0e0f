// lfsr: Galois linear-feedback shift register, re-seeded continuously by an
// external true random bit.
// Each clock the register shifts right; when the bit shifted out is one the
// TAPS mask is XORed in (default x^16+x^14+x^13+x^11+1, maximal length). The
// TRNG bit seed_in is XORed into the new MSB, so the sequence is not
// predictable from the polynomial alone. If the state ever reaches zero it is
// forced back to the non-zero reset value. Width, polynomial and seeding
// method are this design's choices; the block itself (an LFSR seeded by a
// TRNG) follows the published architecture.
module lfsr #(
  parameter int unsigned      WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS  = 16'hB400,
  parameter logic [WIDTH-1:0] INIT  = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seed_in,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps; timeprecision 1ps;
  logic [WIDTH-1:0] nxt;
  always_comb begin
    nxt = (q >> 1) ^ (q[0] ? TAPS : '0);
    nxt[WIDTH-1] = nxt[WIDTH-1] ^ seed_in;
    if (nxt == '0) nxt = INIT;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= INIT;
    else        q <= nxt;
  end
endmodule
