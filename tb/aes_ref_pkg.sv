// aes_ref_pkg: behavioural AES reference model for the testbenches.
//
// Written independently of the RTL: the S-box is computed from its definition
// (multiplicative inverse in GF(2^8), found as a^254 by square-and-multiply,
// followed by the affine map) instead of a table, the key schedule is the
// full FIPS-197 KeyExpansion into an array, and the cipher works on a 4x4
// byte matrix. Blocks use the same byte order as the RTL: byte 0 in bits
// [127:120].
package aes_ref_pkg;

  typedef logic [7:0] b8_t;

  function automatic b8_t gmul(b8_t a, b8_t b);
    b8_t r = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic b8_t ginv(b8_t a);
    b8_t r = 8'h01;
    b8_t p = a;
    int unsigned e = 254;
    while (e != 0) begin
      if (e & 1) r = gmul(r, p);
      p = gmul(p, p);
      e = e >> 1;
    end
    return (a == 8'h00) ? 8'h00 : r;
  endfunction

  function automatic b8_t rotl8(b8_t x, int n);
    return b8_t'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic b8_t sbox(b8_t a);
    b8_t i = ginv(a);
    return i ^ rotl8(i, 1) ^ rotl8(i, 2) ^ rotl8(i, 3) ^ rotl8(i, 4) ^ 8'h63;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] s);
    logic [127:0] o;
    for (int n = 0; n < 16; n++) o[127-8*n -: 8] = sbox(s[127-8*n -: 8]);
    return o;
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] s);
    b8_t m[4][4];
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) m[r][c] = s[127-8*(4*c+r) -: 8];
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o[127-8*(4*c+r) -: 8] = m[r][(c+r)%4];
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] s);
    logic [127:0] o;
    b8_t a[4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = s[127-8*(4*c+r) -: 8];
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = gmul(8'h02, a[r]) ^ gmul(8'h03, a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    return o;
  endfunction

  // Full key expansion; w[i] for i < 4*(Nr+1). key is right-aligned in 256 bits.
  function automatic void key_expand(logic [255:0] key, int key_bits, ref logic [31:0] w[60]);
    int nk = key_bits / 32;
    int nr = nk + 6;
    b8_t rc = 8'h01;
    for (int i = 0; i < nk; i++) w[i] = key[key_bits-1-32*i -: 32];
    for (int i = nk; i < 4*(nr+1); i++) begin
      logic [31:0] t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [255:0] key, int key_bits);
    logic [31:0] w[60];
    int nr = key_bits / 32 + 6;
    logic [127:0] s;
    key_expand(key, key_bits, w);
    s = pt ^ {w[0], w[1], w[2], w[3]};
    for (int r = 1; r <= nr; r++) begin
      s = shift_rows(sub_bytes(s));
      if (r != nr) s = mix_columns(s);
      s ^= {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
