// aes_ref_pkg: software reference model of AES-256 for the testbenches.
// Written independently of the RTL: the S-box inverse is found by exhaustive
// search over GF(2^8), the key schedule is the word-by-word FIPS-197 loop, and
// the cipher applies the rounds in the textbook order.
package aes_ref_pkg;
  timeunit 1ps; timeprecision 1ps;

  function automatic byte unsigned ref_gmul(byte unsigned a, byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = (a[7]) ? byte'((a << 1) ^ 8'h1b) : byte'(a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic byte unsigned ref_sbox(byte unsigned x);
    byte unsigned inv = 0, s;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (ref_gmul(x, byte'(c)) == 1) inv = byte'(c);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  function automatic logic [31:0] ref_subword(logic [31:0] w);
    return {ref_sbox(w[31:24]), ref_sbox(w[23:16]), ref_sbox(w[15:8]), ref_sbox(w[7:0])};
  endfunction

  // All 15 round keys; rk[r] = w[4r..4r+3].
  typedef logic [127:0] rk_t [15];
  function automatic rk_t ref_key_schedule(logic [255:0] key);
    logic [31:0] w [60];
    logic [31:0] t;
    byte unsigned rcon = 8'h01;
    rk_t rk;
    for (int i = 0; i < 8; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = ref_subword({t[23:0], t[31:24]}) ^ {rcon, 24'h0};
        rcon = ref_gmul(rcon, 8'h02);
      end else if (i % 8 == 4) begin
        t = ref_subword(t);
      end
      w[i] = w[i-8] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] s);
    for (int i = 0; i < 16; i++) s[8*i +: 8] = ref_sbox(s[8*i +: 8]);
    return s;
  endfunction

  // Byte k of the state is s[127-8k -: 8]; k = row + 4*column.
  function automatic logic [127:0] ref_shift_rows(logic [127:0] s);
    byte unsigned b [16];
    logic [127:0] o;
    for (int k = 0; k < 16; k++) b[k] = s[127 - 8*k -: 8];
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++)
        o[127 - 8*(row + 4*col) -: 8] = b[row + 4*((col + row) % 4)];
    return o;
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] s);
    byte unsigned a [4];
    logic [127:0] o;
    for (int col = 0; col < 4; col++) begin
      for (int row = 0; row < 4; row++) a[row] = s[127 - 8*(row + 4*col) -: 8];
      for (int row = 0; row < 4; row++)
        o[127 - 8*(row + 4*col) -: 8] = ref_gmul(a[row], 2) ^ ref_gmul(a[(row+1)%4], 3)
                                        ^ a[(row+2)%4] ^ a[(row+3)%4];
    end
    return o;
  endfunction

  // State after round n (1..13) including that round's key addition.
  function automatic logic [127:0] ref_state_after(logic [127:0] pt, logic [255:0] key, int n);
    rk_t rk = ref_key_schedule(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= n; r++)
      s = ref_mix_columns(ref_shift_rows(ref_sub_bytes(s))) ^ rk[r];
    return s;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [255:0] key);
    rk_t rk = ref_key_schedule(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r < 14; r++)
      s = ref_mix_columns(ref_shift_rows(ref_sub_bytes(s))) ^ rk[r];
    return ref_shift_rows(ref_sub_bytes(s)) ^ rk[14];
  endfunction
endpackage
