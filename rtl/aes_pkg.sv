// aes_pkg: shared AES constants and byte-level functions.
// The S-box is computed, not tabulated: the multiplicative inverse in
// GF(2^8) (modulus x^8+x^4+x^3+x+1) is formed as a^254 by square-and-multiply,
// then the FIPS-197 affine transform is applied. The same functions serve
// SubBytes and the key schedule's SubWord. All functions are combinational.
package aes_pkg;
  timeunit 1ps; timeprecision 1ps;


  // Multiply by x in GF(2^8).
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Inverse as a^254 (a^254 = a^-1 for a != 0, and 0 for a = 0).
  function automatic logic [7:0] ginv(input logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128, r;
    a2   = gmul(a, a);
    a4   = gmul(a2, a2);
    a8   = gmul(a4, a4);
    a16  = gmul(a8, a8);
    a32  = gmul(a16, a16);
    a64  = gmul(a32, a32);
    a128 = gmul(a64, a64);
    // 254 = 128+64+32+16+8+4+2
    r = gmul(a128, a64);
    r = gmul(r, a32);
    r = gmul(r, a16);
    r = gmul(r, a8);
    r = gmul(r, a4);
    r = gmul(r, a2);
    return r;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b, s;
    b = ginv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic logic [31:0] rot_word(input logic [31:0] w);
    return {w[23:0], w[31:24]};
  endfunction
endpackage
