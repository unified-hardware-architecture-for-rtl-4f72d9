// unified_sbox: one 8-bit S-box for AES SubBytes, AES InvSubBytes and the four
// Camellia S-boxes s1..s4.
//
// Structure (as in the document): an input affine stage, one shared
// GF((2^4)^2) inverter and an output affine stage. Each stage holds three
// maps merged into a single matrix: connections common to all three maps are
// fixed and their XORs shared, the others are enabled by the mode.
//   AES encryption : delta            -> inv -> A * delta^-1 (+0x63)
//   AES decryption : delta * A^-1     -> inv -> delta^-1
//   Camellia       : f (incl. 0xc5)   -> inv -> h (incl. 0x6e)
// Camellia s2..s4 differ from s1 only in bit order: s4 rotates the input
// left by one, s2 rotates the output left by one and s3 rotates it right by
// one. Those rotations are wiring selected by the mode.
// The matrices come from uc_pkg; they are derived for this design's choice of
// isomorphism delta. The six maps need 106 two-input XORs when built
// separately and 87 when merged (plus gating); the document's own delta and
// hand-factored terms reach fewer, which this design does not reproduce.
// Interface: x and mode in, y out; purely combinational.
module unified_sbox
  import uc_pkg::*;
(
  input  logic [7:0]  x,
  input  sbox_mode_e  mode,
  output logic [7:0]  y
);
  logic [7:0] x_rot, c_in, c_out, o;
  logic [2:0] sel;  // one-hot: AES encryption, AES decryption, Camellia

  gf_comp_inv u_inv (.c(c_in), .c_inv(c_out));

  always_comb begin
    sel   = {mode inside {SB_CAM1, SB_CAM2, SB_CAM3, SB_CAM4},
             mode == SB_AES_DEC, mode == SB_AES_ENC};
    x_rot = (mode == SB_CAM4) ? rotl8(x, 1) : x;
    c_in  = affine8_merged(IN_AES_ENC_M, IN_AES_DEC_M, IN_CAM_M,
                           IN_AES_ENC_C, IN_AES_DEC_C, IN_CAM_C, sel, x_rot);
    o     = affine8_merged(OUT_AES_ENC_M, OUT_AES_DEC_M, OUT_CAM_M,
                           OUT_AES_ENC_C, OUT_AES_DEC_C, OUT_CAM_C, sel, c_out);
    unique case (mode)
      SB_CAM2: y = rotl8(o, 1);
      SB_CAM3: y = rotl8(o, 7);
      default: y = o;
    endcase
  end
endmodule
