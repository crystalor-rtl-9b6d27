// tb_aes_ref_pkg: behavioural reference models for the testbenches.
// ref_aes128 is a plain, non-pipelined AES-128 over a byte array whose S-box
// is built by walking the multiplicative group with generator 3 (a different
// construction from the RTL). ref_gf_mul_idx multiplies L by an index as a
// polynomial over GF(2^128) bit by bit, and ref_pxor_tag computes the
// PXOR-Hash tag from its defining sum.
package tb_aes_ref_pkg;

  function automatic logic [7:0] rotl8(input logic [7:0] x, input int s);
    return (x << s) | (x >> (8 - s));
  endfunction

  function automatic void build_sbox(output logic [7:0] sb [256]);
    logic [7:0] p, q, x;
    p = 1; q = 1;
    do begin
      p = p ^ (p << 1) ^ ((p & 8'h80) != 0 ? 8'h1b : 8'h00);   // p *= 3
      q = q ^ (q << 1);                                          // q /= 3
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      sb[p] = x ^ 8'h63;
    end while (p != 1);
    sb[0] = 8'h63;
  endfunction

  function automatic logic [7:0] mul2(input logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] ref_aes128(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] sb [256];
    logic [7:0] s [16], t [16], w [176];
    logic [7:0] rc, tmp0, tmp1, tmp2, tmp3;
    logic [127:0] out;
    build_sbox(sb);
    for (int i = 0; i < 16; i++) begin
      w[i] = key[127-8*i -: 8];
      s[i] = pt[127-8*i -: 8];
    end
    rc = 1;
    for (int i = 16; i < 176; i += 4) begin
      tmp0 = w[i-4]; tmp1 = w[i-3]; tmp2 = w[i-2]; tmp3 = w[i-1];
      if (i % 16 == 0) begin
        logic [7:0] h;
        h = tmp0;
        tmp0 = sb[tmp1] ^ rc; tmp1 = sb[tmp2]; tmp2 = sb[tmp3]; tmp3 = sb[h];
        rc = mul2(rc);
      end
      w[i] = w[i-16] ^ tmp0; w[i+1] = w[i-15] ^ tmp1;
      w[i+2] = w[i-14] ^ tmp2; w[i+3] = w[i-13] ^ tmp3;
    end
    for (int i = 0; i < 16; i++) s[i] ^= w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = sb[s[(i + 4 * (i % 4)) % 16]];
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a [4];
          logic [7:0] all;
          for (int j = 0; j < 4; j++) a[j] = t[4*c+j];
          all = a[0] ^ a[1] ^ a[2] ^ a[3];
          for (int j = 0; j < 4; j++) t[4*c+j] = a[j] ^ all ^ mul2(a[j] ^ a[(j+1)%4]);
        end
      end
      for (int i = 0; i < 16; i++) s[i] = t[i] ^ w[16*r+i];
    end
    for (int i = 0; i < 16; i++) out[127-8*i -: 8] = s[i];
    return out;
  endfunction

  // idx * L over GF(2^128), reduction polynomial x^128 + x^7 + x^2 + x + 1.
  function automatic logic [127:0] ref_gf_mul_idx(input logic [63:0] idx, input logic [127:0] l);
    logic [127:0] acc, p;
    acc = '0; p = l;
    for (int j = 0; j < 64; j++) begin
      if (idx[j]) acc ^= p;
      p = {p[126:0], 1'b0} ^ (p[127] ? 128'h87 : 128'h0);
    end
    return acc;
  endfunction

  // One term E_K(i*L ^ D[i]) of the PXOR-Hash sum.
  function automatic logic [127:0] ref_pxor_term(input logic [127:0] key, input logic [127:0] l,
                                                 input logic [63:0] i, input logic [127:0] d);
    return ref_aes128(key, ref_gf_mul_idx(i, l) ^ d);
  endfunction

endpackage
