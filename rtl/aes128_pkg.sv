// aes128_pkg: AES-128 building blocks (FIPS-197) shared by the pipelined
// encryption engine. The S-box is not stored as a literal table; it is
// generated at elaboration time from its definition (multiplicative inverse
// in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the affine map with constant
// 0x63). Byte 0 of a 128-bit block is bits [127:120]; column c holds bytes
// 4c..4c+3, row r of column c is byte 4c+r.
package aes128_pkg;

  typedef logic [127:0] aes_blk_t;

  function automatic logic [7:0] gf8_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // S-box entry from its definition: inverse (x^254) then affine transform.
  function automatic logic [7:0] sbox_entry(input logic [7:0] x);
    logic [7:0] inv, sq, b;
    inv = 8'h01;
    sq  = x;
    for (int i = 1; i < 8; i++) begin
      sq  = gf8_mul(sq, sq);       // x^(2^i)
      inv = gf8_mul(inv, sq);      // product of x^2 .. x^128 = x^254
    end
    for (int i = 0; i < 8; i++)
      b[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return b ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] gen_sbox();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = sbox_entry(8'(i));
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX = gen_sbox();

  function automatic logic [7:0] get_byte(input aes_blk_t s, input int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic aes_blk_t sub_shift(input aes_blk_t s);
    aes_blk_t o;
    // ShiftRows: row r of column c takes row r of column (c+r) mod 4.
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = SBOX[get_byte(s, 4*((c+r)%4)+r)];
    return o;
  endfunction

  function automatic aes_blk_t mix_columns(input aes_blk_t s);
    aes_blk_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);
      a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2);
      a3 = get_byte(s, 4*c+3);
      o[127-8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[127-8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  // Next round key from the previous one and the round constant.
  function automatic aes_blk_t next_round_key(input aes_blk_t rk, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    w0 = rk[127:96];
    w1 = rk[95:64];
    w2 = rk[63:32];
    w3 = rk[31:0];
    t  = {SBOX[w3[23:16]] ^ rcon, SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  // Round constant of round r (1..10).
  function automatic logic [7:0] rcon_of(input int r);
    logic [7:0] v;
    v = 8'h01;
    for (int i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

endpackage
