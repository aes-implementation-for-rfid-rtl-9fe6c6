// aes_ref_pkg: software reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: field products are carry-less
// multiplications reduced by long division with 0x11b, the S-box inverse is
// found by exhaustive search, the affine transforms are written as bit
// rotations, and the cipher works on a byte array in FIPS-197 order
// (byte k = row k%4, column k/4).
package aes_ref_pkg;

  typedef logic [7:0] u8;

  function automatic u8 ref_mul(u8 a, u8 b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic u8 rotl8(u8 x, int n);
    return u8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic u8 ref_inv(u8 a);
    if (a == 0) return 0;
    for (int b = 1; b < 256; b++) if (ref_mul(a, u8'(b)) == 8'h01) return u8'(b);
    return 0;
  endfunction

  function automatic u8 ref_sbox(u8 a);
    u8 b;
    b = ref_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic u8 ref_inv_sbox(u8 a);
    u8 b;
    b = rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05;
    return ref_inv(b);
  endfunction

  // Precomputed tables, filled by init_tables().
  u8 SB [256];
  u8 ISB [256];

  function automatic void init_tables();
    for (int i = 0; i < 256; i++) begin
      SB[i]  = ref_sbox(u8'(i));
      ISB[i] = ref_inv_sbox(u8'(i));
    end
  endfunction

  // Column mix of bytes c[0..3] with coefficient row m.
  function automatic logic [31:0] ref_mix_col(logic [31:0] col, bit inv);
    u8 s [4];
    u8 m [4];
    logic [31:0] r;
    for (int i = 0; i < 4; i++) s[i] = col[31 - 8*i -: 8];
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int i = 0; i < 4; i++) begin
      u8 acc;
      acc = 0;
      for (int j = 0; j < 4; j++) acc ^= ref_mul(m[(j - i + 4) % 4], s[j]);
      r[31 - 8*i -: 8] = acc;
    end
    return r;
  endfunction

  // All 11 round keys, key[0] = cipher key.
  function automatic void expand_key(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    u8 rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]};
        t ^= {rc, 24'h0};
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] sub_shift(logic [127:0] s, bit inv);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        // encryption: out[r][c] = S(in[r][(c + r) % 4]);
        // decryption: out[r][c] = S^-1(in[r][(c - r) % 4])
        int sc;
        u8 b;
        sc = inv ? (c - r + 4) % 4 : (c + r) % 4;
        b  = s[127 - 8*(4*sc + r) -: 8];
        o[127 - 8*(4*c + r) -: 8] = inv ? ISB[b] : SB[b];
      end
    return o;
  endfunction

  function automatic logic [127:0] mix(logic [127:0] s, bit inv);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = ref_mix_col(s[127 - 32*c -: 32], inv);
    return o;
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand_key(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = sub_shift(s, 1'b0);
      if (r != 10) s = mix(s, 1'b0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    expand_key(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_shift(s, 1'b1);
      s ^= rk[r];
      if (r != 0) s = mix(s, 1'b1);
    end
    return s;
  endfunction

endpackage
