// cipher_datapath: the ciphering block shared by AES-128 and Camellia-128.
//
// A 128-bit state register feeds a 64-bit round datapath: a key XOR, eight
// unified S-boxes, a second key XOR, the unified permutation layer and a final
// XOR. Beside it, one fl_kw and one flinv_kw unit work on the two 64-bit
// halves of the state. What each clock does is set by ctrl.op:
//   DP_LOAD    state <- data_in (or key_in)
//   DP_FL      state <- {FL(hi), FL^-1(lo)}, or state ^ kl128 (whitening,
//              also used for the first AES AddRoundKey); fl_swap exchanges the
//              halves first, giving Camellia's final swap with whitening;
//              fl_from_in takes data_in instead of the state, so a block is
//              loaded and whitened in the same clock
//   DP_FROUND  Camellia round: (L,R) <- (R ^ P(S(L ^ k64)), L)
//   DP_AES_H0  AES round on output columns 0,1; result kept in a 64-bit
//              half register because the old state is still needed
//   DP_AES_H1  AES round on output columns 2,3; state <- {half, result}
//   DP_AES_KEY four S-boxes substitute the key-expansion word sb_in and return
//              it on sb_out; the state holds
// The "switching matrix" in front of the S-boxes performs (Inv)ShiftRows by
// selecting, for output column j and row r, the byte of input column j+r
// (encryption) or j-r (decryption). An AES encryption round is
// S -> MixColumns -> ^K; a decryption round is InvS -> ^K -> InvMixColumns,
// hence the key XOR between the S-boxes and the permutation layer.
// The final AES round bypasses the permutation layer.
// The document gives the 64-bit width, the eight S-boxes, the shared
// permutation layer, the merged FL/whitening units and the reuse of the
// S-boxes by the key schedule; the split into ops, the half register and the
// XOR placement for decryption are this design's.
// Timing: one op per clock, results registered on the rising edge;
// active-low asynchronous reset.
module cipher_datapath
  import uc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  dp_ctrl_t     ctrl,
  input  logic [127:0] data_in,
  input  logic [127:0] key_in,
  input  logic [127:0] rk,       // AES round key
  input  logic [63:0]  k64,      // Camellia F-function key
  input  logic [127:0] kl128,    // FL / whitening key
  input  logic [31:0]  sb_in,    // key-expansion word to substitute
  output logic [31:0]  sb_out,   // substituted word
  output logic [127:0] state
);
  logic [127:0] st_q, fl_in, fl_out;
  logic [63:0]  half_q;
  logic [63:0]  s_in, s_out, mid, p_out, q, post, rk_half;
  sbox_mode_e   s_mode [8];
  perm_mode_e   p_mode;
  logic         aes_half, half_sel;

  // ---------------------------------------------------------- S-boxes
  for (genvar i = 0; i < N_SBOX; i++) begin : g_sbox
    unified_sbox u_sbox (
      .x   (s_in[63 - 8*i -: 8]),
      .mode(s_mode[i]),
      .y   (s_out[63 - 8*i -: 8])
    );
  end

  unified_perm u_perm (.x(mid), .mode(p_mode), .y(p_out));

  fl_kw    u_fl    (.x(fl_in[127:64]), .kl(kl128[127:64]), .en(ctrl.fl_en),
                    .sel_kadd(ctrl.fl_kadd), .y(fl_out[127:64]));
  flinv_kw u_flinv (.x(fl_in[63:0]),   .kl(kl128[63:0]),   .en(ctrl.fl_en),
                    .sel_kadd(ctrl.fl_kadd), .y(fl_out[63:0]));

  // Camellia S-box assignment for bytes x1..x8
  localparam sbox_mode_e CAM_MAP [8] = '{SB_CAM1, SB_CAM2, SB_CAM3, SB_CAM4,
                                         SB_CAM2, SB_CAM3, SB_CAM4, SB_CAM1};

  // switching matrix: (Inv)ShiftRows byte selection for one pair of columns
  function automatic logic [63:0] aes_gather(logic [127:0] st, logic hsel, logic dec);
    logic [63:0] g;
    int unsigned j, src;
    g = '0;
    for (int unsigned jj = 0; jj < 2; jj++) begin
      for (int unsigned r = 0; r < 4; r++) begin
        j   = 2 * 32'(hsel) + jj;
        src = dec ? ((j + 4 - r) % 4) : ((j + r) % 4);
        g[63 - 8*(4*jj + r) -: 8] = st[127 - 8*(4*src + r) -: 8];
      end
    end
    return g;
  endfunction

  always_comb begin
    aes_half = (ctrl.op == DP_AES_H0) || (ctrl.op == DP_AES_H1);
    half_sel = (ctrl.op == DP_AES_H1);
    rk_half  = half_sel ? rk[63:0] : rk[127:64];

    unique case (ctrl.op)
      DP_FROUND:            s_in = st_q[127:64] ^ k64;
      DP_AES_KEY:           s_in = {sb_in, 32'h0};
      DP_AES_H0, DP_AES_H1: s_in = aes_gather(st_q, half_sel, ctrl.aes_dec);
      default:              s_in = '0;
    endcase

    for (int i = 0; i < 8; i++) begin
      if (ctrl.op == DP_FROUND)              s_mode[i] = CAM_MAP[i];
      else if (aes_half && ctrl.aes_dec)     s_mode[i] = SB_AES_DEC;
      else                                   s_mode[i] = SB_AES_ENC;
    end

    if (ctrl.op == DP_FROUND) p_mode = PM_P;
    else if (ctrl.aes_dec)    p_mode = PM_IMC;
    else                      p_mode = PM_MC;

    if (ctrl.fl_from_in)   fl_in = data_in;
    else if (ctrl.fl_swap) fl_in = {st_q[63:0], st_q[127:64]};
    else                   fl_in = st_q;
  end

  always_comb begin
    sb_out = s_out[63:32];
    // key XOR between S-boxes and permutation (AES decryption)
    mid = s_out ^ ((aes_half && ctrl.aes_dec) ? rk_half : 64'h0);
  end

  always_comb begin
    q = (aes_half && ctrl.aes_last) ? mid : p_out;
    // final XOR: Feistel addition (Camellia) or AddRoundKey (AES encryption)
    if (ctrl.op == DP_FROUND)               post = q ^ st_q[63:0];
    else if (aes_half && !ctrl.aes_dec)     post = q ^ rk_half;
    else                                    post = q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= '0;
      half_q <= '0;
    end else begin
      unique case (ctrl.op)
        DP_LOAD:   st_q   <= ctrl.load_key ? key_in : data_in;
        DP_FL:     st_q   <= fl_out;
        DP_FROUND: st_q   <= {post, st_q[127:64]};
        DP_AES_H0: half_q <= post;
        DP_AES_H1: st_q   <= {half_q, post};
        default: ;
      endcase
    end
  end

  assign state = st_q;
endmodule
