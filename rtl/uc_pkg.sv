// uc_pkg: types and constants shared by the unified AES-128 / Camellia-128 engine.
//
// The engine computes every S-box (AES SubBytes, AES InvSubBytes, Camellia s1..s4)
// with a single inverter in the composite field GF((2^4)^2) placed between an
// input affine map and an output affine map. The composite field is the one in
// which Camellia defines its S-box: GF(2^4) in polynomial basis with
// alpha^4 = alpha + 1, and GF(2^8) = GF(2^4)[beta] with beta^2 = beta + (alpha^3 + 1).
// An 8-bit composite value c holds a + b*beta with a = c[3:0], b = c[7:4].
// Camellia bytes follow the Camellia convention (bit 7 = x1); AES bytes follow
// the AES convention (bit 0 = coefficient of x^0).
//
// The six affine maps are given as 8 row masks each (row i gives output bit i as
// the parity of mask & input) plus a constant. The Camellia maps are the
// Camellia f and h functions including their constants 0xc5 and 0x6e. The AES
// maps combine the AES affine transform A (constant 0x63) with the isomorphism
// delta from the AES polynomial basis (x^8+x^4+x^3+x+1) into the composite
// field. The delta used here is one of the eight valid isomorphisms, chosen by
// this design; any of them gives the same S-box.
package uc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_SBOX       = 8;    // S-boxes in the 64-bit datapath
  localparam int unsigned AES_ROUNDS   = 10;
  localparam int unsigned CAM_ROUNDS   = 18;
  // clocks per block, counting the clock that accepts the block
  localparam int unsigned AES_CYCLES   = 1 + 3 * AES_ROUNDS;   // 31
  localparam int unsigned CAM_CYCLES   = CAM_ROUNDS + 4;       // 22

  // ---------------------------------------------------------------- modes
  typedef enum logic [2:0] {
    SB_AES_ENC = 3'd0,  // SubBytes
    SB_AES_DEC = 3'd1,  // InvSubBytes
    SB_CAM1    = 3'd2,  // Camellia s1
    SB_CAM2    = 3'd3,  // s2(x) = s1(x) <<< 1
    SB_CAM3    = 3'd4,  // s3(x) = s1(x) >>> 1
    SB_CAM4    = 3'd5   // s4(x) = s1(x <<< 1)
  } sbox_mode_e;

  typedef enum logic [1:0] {
    PM_MC  = 2'd0,  // two AES MixColumns
    PM_IMC = 2'd1,  // two AES InvMixColumns
    PM_P   = 2'd2   // Camellia P-function
  } perm_mode_e;

  typedef enum logic [1:0] {
    OP_KEYSETUP = 2'd0,
    OP_ENCRYPT  = 2'd1,
    OP_DECRYPT  = 2'd2
  } op_e;

  typedef enum logic {
    ALG_AES      = 1'b0,
    ALG_CAMELLIA = 1'b1
  } alg_e;

  // What the datapath does in one clock.
  typedef enum logic [2:0] {
    DP_HOLD    = 3'd0,  // keep state
    DP_LOAD    = 3'd1,  // state <- data input (or key input)
    DP_FL      = 3'd2,  // FL / FL^-1 / key whitening on the 128-bit state
    DP_FROUND  = 3'd3,  // one Camellia Feistel round (64-bit F-function)
    DP_AES_H0  = 3'd4,  // AES round, output columns 0 and 1 -> half register
    DP_AES_H1  = 3'd5,  // AES round, output columns 2 and 3 -> commit state
    DP_AES_KEY = 3'd6   // S-boxes lent to the AES key schedule
  } dp_op_e;

  typedef struct packed {
    dp_op_e op;
    logic   load_key;   // DP_LOAD: take the key input instead of the data input
    logic   aes_dec;    // AES: inverse round
    logic   aes_last;   // AES: final round, permutation layer bypassed
    logic   fl_en;      // DP_FL: enable the XORs of FL / FL^-1
    logic   fl_kadd;    // DP_FL: plain key addition (whitening) instead of FL
    logic   fl_swap;    // DP_FL: exchange the 64-bit halves before the units
    logic   fl_from_in; // DP_FL: take the data input instead of the state
  } dp_ctrl_t;

  typedef struct packed {
    logic       load_kl;    // KL <- key input
    logic       rk_init;    // RK <- KL (or K2 when rk_from_k2)
    logic       rk_from_k2;
    logic       rk_step;    // advance the AES round key this clock
    logic       rk_bwd;     // step backwards (decryption order)
    logic [3:0] rcon_idx;   // round number r of the key K_r involved (1..10)
    logic       store_k2;   // K2 <- RK (AES) or the datapath state (Camellia KA)
    logic       k2_from_dp;
    logic       sigma_en;   // F-function key is a constant Sigma_i (KA derivation)
    logic [1:0] sigma_idx;
    logic [4:0] cam_step;   // Camellia schedule step 0..21
    logic       cam_dec;    // Camellia subkeys in decryption order
    logic       kl_is_kl;   // FL-unit key = KL (KA derivation, first AES encryption key add)
    logic       kl_is_k2;   // FL-unit key = K2 (first AES decryption key add)
  } ks_ctrl_t;

  // ---------------------------------------------------------------- affine maps
  typedef logic [7:0][7:0] mat8_t;  // [row = output bit][mask over input bits]

  localparam mat8_t IN_AES_ENC_M  = {8'ha0, 8'h72, 8'hac, 8'hdc, 8'h1a, 8'h6c, 8'h20, 8'hff};
  localparam logic [7:0] IN_AES_ENC_C  = 8'h00;
  localparam mat8_t IN_AES_DEC_M  = {8'hc6, 8'hbe, 8'h71, 8'h86, 8'h26, 8'h0a, 8'h94, 8'hff};
  localparam logic [7:0] IN_AES_DEC_C  = 8'h34;
  localparam mat8_t IN_CAM_M      = {8'h44, 8'h82, 8'h29, 8'h21, 8'h12, 8'h48, 8'h81, 8'h14};
  localparam logic [7:0] IN_CAM_C      = 8'h75;
  localparam mat8_t OUT_AES_ENC_M = {8'h5e, 8'h90, 8'h46, 8'h27, 8'h31, 8'h7b, 8'h35, 8'hd1};
  localparam logic [7:0] OUT_AES_ENC_C = 8'h63;
  localparam mat8_t OUT_AES_DEC_M = {8'h82, 8'ha6, 8'h02, 8'h94, 8'hec, 8'h4c, 8'h70, 8'h63};
  localparam logic [7:0] OUT_AES_DEC_C = 8'h00;
  localparam mat8_t OUT_CAM_M     = {8'h4c, 8'h44, 8'h12, 8'h41, 8'h22, 8'h81, 8'h88, 8'h24};
  localparam logic [7:0] OUT_CAM_C     = 8'h6e;

  // Three affine maps merged into one matrix. An entry that is 1 in all
  // three maps is a fixed connection, so its XOR is shared by every mode; an
  // entry that is 1 in only some maps is gated by the one-hot select sel.
  // Each output bit is then one XOR tree over the union of the three rows.
  function automatic logic [7:0] affine8_merged(mat8_t m0, mat8_t m1, mat8_t m2,
                                                logic [7:0] c0, logic [7:0] c1,
                                                logic [7:0] c2, logic [2:0] sel,
                                                logic [7:0] x);
    logic [7:0] y, fixed, gated;
    for (int i = 0; i < 8; i++) begin
      fixed = m0[i] & m1[i] & m2[i];
      gated = (m0[i] & {8{sel[0]}}) | (m1[i] & {8{sel[1]}}) | (m2[i] & {8{sel[2]}});
      y[i]  = ^(x & (fixed | gated));
    end
    return y ^ (c0 & {8{sel[0]}}) ^ (c1 & {8{sel[1]}}) ^ (c2 & {8{sel[2]}});
  endfunction

  // ---------------------------------------------------------------- GF(2^4)
  // Polynomial basis, alpha^4 = alpha + 1.
  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] gf16_sq(logic [3:0] a);
    return gf16_mul(a, a);
  endfunction

  // a^-1 = a^14 (0 maps to 0)
  function automatic logic [3:0] gf16_inv(logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf16_sq(a);
    a4 = gf16_sq(a2);
    a8 = gf16_sq(a4);
    return gf16_mul(gf16_mul(a8, a4), a2);
  endfunction

  // ---------------------------------------------------------------- byte helpers
  function automatic logic [7:0] rotl8(logic [7:0] x, int unsigned n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic logic [31:0] rotl32_1(logic [31:0] x);
    return {x[30:0], x[31]};
  endfunction

  // GF(2^8) doubling in the AES field
  function automatic logic [7:0] xtime(logic [7:0] x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  // ---------------------------------------------------------------- key constants
  // AES round constant for the key K_r, r = 1..10
  function automatic logic [7:0] aes_rcon(logic [3:0] r);
    logic [7:0] c;
    c = 8'h01;
    for (int i = 1; i < 10; i++) if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

  // Camellia key-derivation constants Sigma1..Sigma4
  localparam logic [3:0][63:0] CAM_SIGMA = {
    64'h54FF53A5F1D36F1C,   // Sigma4
    64'hC6EF372FE94F82BE,   // Sigma3
    64'hB67AE8584CAA73B2,   // Sigma2
    64'hA09E667F3BCC908B    // Sigma1
  };

endpackage
