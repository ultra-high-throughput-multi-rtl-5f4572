// aes_ref_pkg: a software model of AES-128 encryption for the testbenches.
//
// It is written independently of the RTL: GF(2^8) products use a
// shift-and-add loop, the S-box is computed from its definition (the
// multiplicative inverse followed by the affine map with constant 8'h63)
// rather than read from a table, and the key schedule is the word-by-word
// recurrence w[i] = w[i-4] ^ f(w[i-1]). Byte i of a block is bits
// [127-8*i -: 8] and is state entry (row i mod 4, column i div 4).
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    if (a == 0) return 8'h00;
    for (int b = 1; b < 256; b++)
      if (gmul(a, 8'(b)) == 8'h01) return 8'(b);
    return 8'h00;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    logic [7:0] b = ginv(a);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [7:0] gb(logic [127:0] s, int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = sbox(gb(s, i));
    return o;
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] s);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127-8*(r+4*c) -: 8] = gb(s, r + 4*((c+r)%4));
    return o;
  endfunction

  function automatic logic [31:0] mix_column(logic [31:0] col);
    logic [7:0] a [4];
    logic [7:0] m [4][4] = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    logic [31:0] o;
    for (int i = 0; i < 4; i++) a[i] = col[31-8*i -: 8];
    for (int r = 0; r < 4; r++) begin
      logic [7:0] acc = '0;
      for (int k = 0; k < 4; k++) acc ^= gmul(m[r][k], a[k]);
      o[31-8*r -: 8] = acc;
    end
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127-32*c -: 32] = mix_column(s[127-32*c -: 32]);
    return o;
  endfunction

  // Round keys 0..10 of a 128-bit key, round key j in element j.
  typedef logic [127:0] rk_t [11];

  function automatic rk_t key_schedule(logic [127:0] key);
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t ^= {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int j = 0; j < 11; j++) rk[j] = {w[4*j], w[4*j+1], w[4*j+2], w[4*j+3]};
    return rk;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    rk_t rk = key_schedule(key);
    logic [127:0] s = pt ^ rk[0];
    for (int j = 1; j <= 10; j++) begin
      s = shift_rows(sub_bytes(s));
      if (j != 10) s = mix_columns(s);
      s ^= rk[j];
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
