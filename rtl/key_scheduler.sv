// key_scheduler: round keys for AES-128 and subkeys for Camellia-128.
//
// Three 128-bit registers are shared by both ciphers:
//   KL : the user key (both ciphers)
//   K2 : the last AES round key K10 (for decryption) or the Camellia KA
//   RK : the running AES round key
// AES keys are produced on the fly, one round key per clock in which rk_step
// is set. The S-box substitution of the key expansion is not done here: the
// word RotWord(w3) (forward) or RotWord(w3 ^ w2) (backward) is sent out on
// sb_out to four S-boxes of the ciphering datapath and the substituted word
// comes back on sb_in in the same clock. Forward steps produce K_r from
// K_(r-1); backward steps produce K_(r-1) from K_r; rcon_idx names r.
// Camellia subkeys are rotations of KL and KA. They are selected
// combinationally from the schedule step (0..21) and the direction: k64 is the
// F-function key of a Feistel step, kl128 the key of the FL / FL^-1 pair or of
// the whitening step. During KA derivation k64 is one of Sigma1..Sigma4 and
// kl128 is KL. For AES, kl128 is KL (encryption) or K2 (decryption) for the
// first AddRoundKey, which happens while RK is being initialised.
// The document gives the key scheduler's role, the shared registers and the
// reuse of the S-boxes; the register set and selection logic are this
// design's. Timing: registers update on the rising clock edge; active-low
// asynchronous reset clears them.
module key_scheduler
  import uc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ks_ctrl_t     ctrl,
  input  alg_e         alg,
  input  logic [127:0] key_in,
  input  logic [127:0] dp_state,   // datapath state, holds KA at the end of key setup
  input  logic [31:0]  sb_in,      // S-box results for the key expansion
  output logic [31:0]  sb_out,     // word to substitute
  output logic [127:0] rk,         // AES round key
  output logic [63:0]  k64,        // Camellia F-function key
  output logic [127:0] kl128       // FL / FL^-1 / whitening key
);
  logic [127:0] kl_q, k2_q, rk_q, rk_next;
  logic [31:0]  w0, w1, w2, w3, t, n0, n1, n2, n3;

  function automatic logic [127:0] rotl128(logic [127:0] v, int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (128 - n)));
  endfunction

  function automatic logic [127:0] swap64(logic [127:0] v);
    return {v[63:0], v[127:64]};
  endfunction

  // F-function key k_j, j = 1..18 (Camellia-128 schedule)
  function automatic logic [63:0] cam_fkey(logic [4:0] j, logic [127:0] l, logic [127:0] a);
    logic [127:0] v;
    logic         hi;
    unique case (j)
      5'd1:  begin v = a;               hi = 1'b1; end
      5'd2:  begin v = a;               hi = 1'b0; end
      5'd3:  begin v = rotl128(l, 15);  hi = 1'b1; end
      5'd4:  begin v = rotl128(l, 15);  hi = 1'b0; end
      5'd5:  begin v = rotl128(a, 15);  hi = 1'b1; end
      5'd6:  begin v = rotl128(a, 15);  hi = 1'b0; end
      5'd7:  begin v = rotl128(l, 45);  hi = 1'b1; end
      5'd8:  begin v = rotl128(l, 45);  hi = 1'b0; end
      5'd9:  begin v = rotl128(a, 45);  hi = 1'b1; end
      5'd10: begin v = rotl128(l, 60);  hi = 1'b0; end
      5'd11: begin v = rotl128(a, 60);  hi = 1'b1; end
      5'd12: begin v = rotl128(a, 60);  hi = 1'b0; end
      5'd13: begin v = rotl128(l, 94);  hi = 1'b1; end
      5'd14: begin v = rotl128(l, 94);  hi = 1'b0; end
      5'd15: begin v = rotl128(a, 94);  hi = 1'b1; end
      5'd16: begin v = rotl128(a, 94);  hi = 1'b0; end
      5'd17: begin v = rotl128(l, 111); hi = 1'b1; end
      default: begin v = rotl128(l, 111); hi = 1'b0; end
    endcase
    return hi ? v[127:64] : v[63:0];
  endfunction

  // Key of the FL / FL^-1 pair or of whitening at schedule step 0, 7, 14, 21
  function automatic logic [127:0] cam_flkey(logic [4:0] s, logic dec,
                                             logic [127:0] l, logic [127:0] a);
    if (!dec) begin
      unique case (s)
        5'd0:    return l;                       // kw1 | kw2
        5'd7:    return rotl128(a, 30);          // ke1 | ke2
        5'd14:   return rotl128(l, 77);          // ke3 | ke4
        default: return rotl128(a, 111);         // kw3 | kw4
      endcase
    end else begin
      unique case (s)
        5'd0:    return rotl128(a, 111);         // kw3 | kw4
        5'd7:    return swap64(rotl128(l, 77));  // ke4 | ke3
        5'd14:   return swap64(rotl128(a, 30));  // ke2 | ke1
        default: return l;                       // kw1 | kw2
      endcase
    end
  endfunction

  // Feistel round number of a schedule step (1..6, 8..13, 15..20)
  function automatic logic [4:0] cam_round(logic [4:0] s, logic dec);
    logic [4:0] j;
    if (s < 5'd7)       j = s;
    else if (s < 5'd14) j = s - 5'd1;
    else                j = s - 5'd2;
    return dec ? (5'd19 - j) : j;
  endfunction

  // ------------------------------------------------------------ AES expansion
  always_comb begin
    {w0, w1, w2, w3} = rk_q;
    t      = ctrl.rk_bwd ? (w3 ^ w2) : w3;
    sb_out = {t[23:0], t[31:24]};                 // RotWord
    if (!ctrl.rk_bwd) begin
      n0 = w0 ^ sb_in ^ {aes_rcon(ctrl.rcon_idx), 24'h0};
      n1 = w1 ^ n0;
      n2 = w2 ^ n1;
      n3 = w3 ^ n2;
    end else begin
      n3 = w3 ^ w2;
      n2 = w2 ^ w1;
      n1 = w1 ^ w0;
      n0 = w0 ^ sb_in ^ {aes_rcon(ctrl.rcon_idx), 24'h0};
    end
    rk_next = {n0, n1, n2, n3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kl_q <= '0;
      k2_q <= '0;
      rk_q <= '0;
    end else begin
      if (ctrl.load_kl) kl_q <= key_in;
      if (ctrl.rk_init) rk_q <= ctrl.rk_from_k2 ? k2_q : (ctrl.load_kl ? key_in : kl_q);
      else if (ctrl.rk_step) rk_q <= rk_next;
      if (ctrl.store_k2) k2_q <= ctrl.k2_from_dp ? dp_state : rk_q;
    end
  end

  // ------------------------------------------------------------ outputs
  always_comb begin
    rk = rk_q;
    if (ctrl.sigma_en) k64 = CAM_SIGMA[ctrl.sigma_idx];
    else               k64 = cam_fkey(cam_round(ctrl.cam_step, ctrl.cam_dec), kl_q, k2_q);
    if (ctrl.kl_is_kl)                      kl128 = kl_q;
    else if (ctrl.kl_is_k2)                 kl128 = k2_q;
    else if (alg == ALG_AES)                kl128 = rk_q;
    else                                    kl128 = cam_flkey(ctrl.cam_step, ctrl.cam_dec, kl_q, k2_q);
  end
endmodule
