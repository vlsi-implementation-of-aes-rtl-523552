// aes_ref_pkg: reference models for the testbenches, written independently
// of the RTL. AES-128 works on byte arrays: the S-box is built from
// logarithm/antilogarithm tables of GF(2^8) with generator {03}, the round
// steps are applied one by one (SubBytes, ShiftRows, MixColumns by general
// multiplication, AddRoundKey) and the key schedule follows FIPS-197 word by
// word. Also holds the integer Haar lifting reference and the pixel helpers.
package aes_ref_pkg;

  typedef byte unsigned bytes16_t [16];

  function automatic int unsigned mul(int unsigned a, int unsigned b);
    int unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if ((b >> i) & 1) p ^= a;
      a = (a & 8'h80) ? (((a << 1) ^ 9'h11b) & 8'hff) : (a << 1);
    end
    return p;
  endfunction

  // tables filled on first use
  int unsigned sb_tbl  [256];
  int unsigned isb_tbl [256];
  bit          tbl_ok = 0;

  function automatic void build_tables();
    int unsigned e [256];
    int unsigned l [256];
    int unsigned x = 1, v, inv, r;
    for (int i = 0; i < 255; i++) begin
      e[i] = x;
      l[x] = i;
      x = mul(x, 3);
    end
    for (int a = 0; a < 256; a++) begin
      inv = (a == 0) ? 0 : e[(255 - l[a]) % 255];
      r = 8'h63;
      for (int i = 0; i < 5; i++) begin
        v = ((inv << i) | (inv >> (8 - i))) & 8'hff;
        r ^= v;
      end
      sb_tbl[a]  = r;
      isb_tbl[r] = a;
    end
    tbl_ok = 1;
  endfunction

  function automatic int unsigned sbox(int unsigned a);
    if (!tbl_ok) build_tables();
    return sb_tbl[a & 8'hff];
  endfunction

  function automatic int unsigned inv_sbox(int unsigned a);
    if (!tbl_ok) build_tables();
    return isb_tbl[a & 8'hff];
  endfunction

  function automatic bytes16_t to_bytes(logic [127:0] v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127 - 8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] to_vec(bytes16_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = b[i];
    return v;
  endfunction

  // round keys 0..10 of a 128-bit key
  function automatic void key_schedule(logic [127:0] key, output logic [127:0] rk [11]);
    byte unsigned w [44][4];
    byte unsigned t [4];
    int unsigned rc = 1;
    bytes16_t kb = to_bytes(key);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) w[i][j] = kb[4*i + j];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        byte unsigned t0 = t[0];
        t[0] = sbox(t[1]) ^ rc;
        t[1] = sbox(t[2]);
        t[2] = sbox(t[3]);
        t[3] = sbox(t0);
        rc = mul(rc, 2);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int r = 0; r < 11; r++) begin
      bytes16_t kb2;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) kb2[4*i + j] = w[4*r + i][j];
      rk[r] = to_vec(kb2);
    end
  endfunction

  function automatic logic [127:0] enc_round(logic [127:0] s, logic [127:0] k, bit last);
    bytes16_t a = to_bytes(s), b, c;
    for (int i = 0; i < 16; i++) a[i] = sbox(a[i]);                 // SubBytes
    for (int col = 0; col < 4; col++)                                // ShiftRows
      for (int row = 0; row < 4; row++) b[4*col + row] = a[4*((col + row) % 4) + row];
    if (last) c = b;
    else
      for (int col = 0; col < 4; col++) begin                        // MixColumns
        c[4*col]   = mul(b[4*col], 2) ^ mul(b[4*col+1], 3) ^ b[4*col+2] ^ b[4*col+3];
        c[4*col+1] = b[4*col] ^ mul(b[4*col+1], 2) ^ mul(b[4*col+2], 3) ^ b[4*col+3];
        c[4*col+2] = b[4*col] ^ b[4*col+1] ^ mul(b[4*col+2], 2) ^ mul(b[4*col+3], 3);
        c[4*col+3] = mul(b[4*col], 3) ^ b[4*col+1] ^ b[4*col+2] ^ mul(b[4*col+3], 2);
      end
    return to_vec(c) ^ k;                                            // AddRoundKey
  endfunction

  function automatic logic [127:0] dec_round(logic [127:0] s, logic [127:0] k, bit last);
    bytes16_t a = to_bytes(s), b, c;
    for (int col = 0; col < 4; col++)                                // InvShiftRows
      for (int row = 0; row < 4; row++) b[4*((col + row) % 4) + row] = a[4*col + row];
    for (int i = 0; i < 16; i++) b[i] = inv_sbox(b[i]);              // InvSubBytes
    b = to_bytes(to_vec(b) ^ k);                                     // AddRoundKey
    if (last) c = b;
    else
      for (int col = 0; col < 4; col++)                              // InvMixColumns
        for (int row = 0; row < 4; row++)
          c[4*col + row] = mul(b[4*col + row], 14) ^ mul(b[4*col + (row+1)%4], 11)
                         ^ mul(b[4*col + (row+2)%4], 13) ^ mul(b[4*col + (row+3)%4], 9);
    return to_vec(c);
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] rk [11];
    logic [127:0] s;
    key_schedule(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) s = enc_round(s, rk[r], r == 10);
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // ------------------------------------------------------------- Haar LWT
  function automatic int fdiv2(int v);           // floor(v / 2)
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  // {ll, hl, lh, hh} of pixels x00 x01 / x10 x11
  function automatic void haar_fwd(int x00, int x01, int x10, int x11,
                                   output int ll, output int hl, output int lh, output int hh);
    int d0 = x00 - x01, s0 = x01 + fdiv2(x00 - x01);
    int d1 = x10 - x11, s1 = x11 + fdiv2(x10 - x11);
    lh = s0 - s1;  ll = s1 + fdiv2(s0 - s1);
    hh = d0 - d1;  hl = d1 + fdiv2(d0 - d1);
  endfunction

  function automatic void haar_inv(int ll, int hl, int lh, int hh,
                                   output int x00, output int x01, output int x10, output int x11);
    int s1 = ll - fdiv2(lh), s0 = lh + s1;
    int d1 = hl - fdiv2(hh), d0 = hh + d1;
    x01 = s0 - fdiv2(d0);  x00 = d0 + x01;
    x11 = s1 - fdiv2(d1);  x10 = d1 + x11;
  endfunction

endpackage
