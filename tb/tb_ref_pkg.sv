// tb_ref_pkg: reference models for the testbenches, written from the AES
// (FIPS-197) and Camellia (RFC 3713) definitions and independent of the RTL.
// The S-box tables are filled by ref_init(): AES by brute-force inversion in
// GF(2^8) mod x^8+x^4+x^3+x+1 followed by the affine map, Camellia s1 by the
// specification's f, brute-force inversion in GF((2^4)^2) and h.
package tb_ref_pkg;

  logic [7:0] AES_SB  [256];
  logic [7:0] AES_ISB [256];
  logic [7:0] CAM_S1  [256];

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [3:0] m16(logic [3:0] a, logic [3:0] b);
    logic [3:0] r;
    r = 0;
    for (int i = 0; i < 4; i++) begin
      if (b[i]) r ^= a;
      a = {a[2:0], 1'b0} ^ (a[3] ? 4'h3 : 4'h0);
    end
    return r;
  endfunction

  // (a + b beta)(c + d beta), beta^2 = beta + alpha^3 + 1
  function automatic logic [7:0] cmul(logic [7:0] x, logic [7:0] y);
    logic [3:0] a, b, c, d, bd;
    a = x[3:0]; b = x[7:4]; c = y[3:0]; d = y[7:4];
    bd = m16(b, d);
    return {m16(a, d) ^ m16(b, c) ^ bd, m16(a, c) ^ m16(bd, 4'h9)};
  endfunction

  function automatic logic [7:0] cam_f(logic [7:0] v);
    logic [1:8] x;
    x = v ^ 8'hc5;
    return {x[6]^x[2], x[7]^x[1], x[8]^x[5]^x[3], x[8]^x[3],
            x[7]^x[4], x[5]^x[2], x[8]^x[1], x[6]^x[4]};
  endfunction

  function automatic logic [7:0] cam_h(logic [7:0] v);
    logic [1:8] x;
    x = v;
    return {x[5]^x[6]^x[2], x[6]^x[2], x[7]^x[4], x[8]^x[2],
            x[7]^x[3], x[8]^x[1], x[5]^x[1], x[6]^x[3]} ^ 8'h6e;
  endfunction

  function automatic void ref_init();
    logic [7:0] inv, b;
    for (int x = 0; x < 256; x++) begin
      inv = 0;
      for (int y = 1; y < 256; y++) if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      b = inv;
      for (int i = 0; i < 8; i++)
        AES_SB[x][i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
      AES_SB[x] ^= 8'h63;
    end
    for (int x = 0; x < 256; x++) AES_ISB[AES_SB[x]] = 8'(x);
    for (int x = 0; x < 256; x++) begin
      logic [7:0] u;
      u = cam_f(8'(x));
      inv = 0;
      for (int y = 1; y < 256; y++) if (cmul(u, 8'(y)) == 8'h01) inv = 8'(y);
      CAM_S1[x] = cam_h(inv);
    end
  endfunction

  function automatic logic [7:0] rl8(logic [7:0] x, int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [7:0] cam_s(int which, logic [7:0] x);
    case (which)
      1: return CAM_S1[x];
      2: return rl8(CAM_S1[x], 1);
      3: return rl8(CAM_S1[x], 7);
      default: return CAM_S1[rl8(x, 1)];
    endcase
  endfunction

  // ------------------------------------------------------------ AES
  function automatic logic [7:0] byte_of(logic [127:0] s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic logic [31:0] mixcol(logic [31:0] c, bit inv);
    logic [7:0] a [4];
    logic [7:0] r [4];
    for (int i = 0; i < 4; i++) a[i] = c[31 - 8*i -: 8];
    for (int i = 0; i < 4; i++) begin
      if (!inv)
        r[i] = gmul(a[i], 2) ^ gmul(a[(i+1)%4], 3) ^ a[(i+2)%4] ^ a[(i+3)%4];
      else
        r[i] = gmul(a[i], 8'h0e) ^ gmul(a[(i+1)%4], 8'h0b) ^ gmul(a[(i+2)%4], 8'h0d)
             ^ gmul(a[(i+3)%4], 8'h09);
    end
    return {r[0], r[1], r[2], r[3]};
  endfunction

  function automatic void aes_expand(logic [127:0] key, output logic [127:0] rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 1;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {AES_SB[t[23:16]], AES_SB[t[15:8]], AES_SB[t[7:0]], AES_SB[t[31:24]]} ^ {rc, 24'h0};
        rc = gmul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] aes_enc(logic [127:0] key, logic [127:0] pt);
    logic [127:0] rk [11];
    logic [127:0] s, t;
    aes_expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++)
          t[127 - 8*(4*c + row) -: 8] = AES_SB[byte_of(s, 4*((c + row) % 4) + row)];
      if (r != 10) for (int c = 0; c < 4; c++) t[127 - 32*c -: 32] = mixcol(t[127 - 32*c -: 32], 0);
      s = t ^ rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] aes_dec(logic [127:0] key, logic [127:0] ct);
    logic [127:0] rk [11];
    logic [127:0] s, t;
    aes_expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      for (int c = 0; c < 4; c++)
        for (int row = 0; row < 4; row++)
          t[127 - 8*(4*c + row) -: 8] = AES_ISB[byte_of(s, 4*((c - row + 4) % 4) + row)];
      t = t ^ rk[r];
      if (r != 0) for (int c = 0; c < 4; c++) t[127 - 32*c -: 32] = mixcol(t[127 - 32*c -: 32], 1);
      s = t;
    end
    return s;
  endfunction

  // ------------------------------------------------------------ Camellia
  function automatic logic [63:0] cam_p(logic [63:0] x);
    logic [7:0] z [1:8];
    for (int i = 1; i <= 8; i++) z[i] = x[63 - 8*(i-1) -: 8];
    return {z[1]^z[3]^z[4]^z[6]^z[7]^z[8], z[1]^z[2]^z[4]^z[5]^z[7]^z[8],
            z[1]^z[2]^z[3]^z[5]^z[6]^z[8], z[2]^z[3]^z[4]^z[5]^z[6]^z[7],
            z[1]^z[2]^z[6]^z[7]^z[8],      z[2]^z[3]^z[5]^z[7]^z[8],
            z[3]^z[4]^z[5]^z[6]^z[8],      z[1]^z[4]^z[5]^z[6]^z[7]};
  endfunction

  function automatic logic [63:0] cam_sbytes(logic [63:0] x);
    const int map [8] = '{1, 2, 3, 4, 2, 3, 4, 1};
    logic [63:0] y;
    for (int i = 0; i < 8; i++) y[63 - 8*i -: 8] = cam_s(map[i], x[63 - 8*i -: 8]);
    return y;
  endfunction

  function automatic logic [63:0] cam_F(logic [63:0] x, logic [63:0] k);
    return cam_p(cam_sbytes(x ^ k));
  endfunction

  function automatic logic [31:0] rl32(logic [31:0] x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic logic [63:0] cam_fl(logic [63:0] x, logic [63:0] k);
    logic [31:0] l, r;
    l = x[63:32]; r = x[31:0];
    r = r ^ rl32(l & k[63:32], 1);
    l = l ^ (r | k[31:0]);
    return {l, r};
  endfunction

  function automatic logic [63:0] cam_flinv(logic [63:0] y, logic [63:0] k);
    logic [31:0] l, r;
    l = y[63:32]; r = y[31:0];
    l = l ^ (r | k[31:0]);
    r = r ^ rl32(l & k[63:32], 1);
    return {l, r};
  endfunction

  function automatic logic [127:0] rl128(logic [127:0] x, int n);
    return (n == 0) ? x : ((x << n) | (x >> (128 - n)));
  endfunction

  function automatic logic [127:0] cam_ka(logic [127:0] kl);
    logic [63:0] d1, d2;
    d1 = kl[127:64]; d2 = kl[63:0];
    d2 ^= cam_F(d1, 64'hA09E667F3BCC908B);
    d1 ^= cam_F(d2, 64'hB67AE8584CAA73B2);
    d1 ^= kl[127:64]; d2 ^= kl[63:0];
    d2 ^= cam_F(d1, 64'hC6EF372FE94F82BE);
    d1 ^= cam_F(d2, 64'h54FF53A5F1D36F1C);
    return {d1, d2};
  endfunction

  // subkeys: kw[1..4], k[1..18], ke[1..4]
  function automatic void cam_keys(logic [127:0] kl, output logic [63:0] kw [1:4],
                                   output logic [63:0] k [1:18], output logic [63:0] ke [1:4]);
    logic [127:0] ka, t;
    ka = cam_ka(kl);
    kw[1] = kl[127:64]; kw[2] = kl[63:0];
    k[1] = ka[127:64];  k[2] = ka[63:0];
    t = rl128(kl, 15);  k[3] = t[127:64];  k[4] = t[63:0];
    t = rl128(ka, 15);  k[5] = t[127:64];  k[6] = t[63:0];
    t = rl128(ka, 30);  ke[1] = t[127:64]; ke[2] = t[63:0];
    t = rl128(kl, 45);  k[7] = t[127:64];  k[8] = t[63:0];
    t = rl128(ka, 45);  k[9] = t[127:64];
    t = rl128(kl, 60);  k[10] = t[63:0];
    t = rl128(ka, 60);  k[11] = t[127:64]; k[12] = t[63:0];
    t = rl128(kl, 77);  ke[3] = t[127:64]; ke[4] = t[63:0];
    t = rl128(kl, 94);  k[13] = t[127:64]; k[14] = t[63:0];
    t = rl128(ka, 94);  k[15] = t[127:64]; k[16] = t[63:0];
    t = rl128(kl, 111); k[17] = t[127:64]; k[18] = t[63:0];
    t = rl128(ka, 111); kw[3] = t[127:64]; kw[4] = t[63:0];
  endfunction

  function automatic logic [127:0] cam_crypt(logic [127:0] kl, logic [127:0] m, bit dec);
    logic [63:0] kw [1:4];
    logic [63:0] k  [1:18];
    logic [63:0] ke [1:4];
    logic [63:0] d1, d2;
    cam_keys(kl, kw, k, ke);
    if (dec) begin
      logic [63:0] t;
      for (int i = 1; i <= 9; i++) begin t = k[i]; k[i] = k[19-i]; k[19-i] = t; end
      t = kw[1]; kw[1] = kw[3]; kw[3] = t;
      t = kw[2]; kw[2] = kw[4]; kw[4] = t;
      t = ke[1]; ke[1] = ke[4]; ke[4] = t;
      t = ke[2]; ke[2] = ke[3]; ke[3] = t;
    end
    d1 = m[127:64] ^ kw[1];
    d2 = m[63:0] ^ kw[2];
    for (int b = 0; b < 3; b++) begin
      for (int i = 0; i < 3; i++) begin
        d2 ^= cam_F(d1, k[6*b + 2*i + 1]);
        d1 ^= cam_F(d2, k[6*b + 2*i + 2]);
      end
      if (b < 2) begin
        d1 = cam_fl(d1, ke[2*b + 1]);
        d2 = cam_flinv(d2, ke[2*b + 2]);
      end
    end
    return {d2 ^ kw[3], d1 ^ kw[4]};
  endfunction

endpackage
