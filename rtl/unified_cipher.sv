// unified_cipher: AES-128 and Camellia-128 encryption and decryption in one
// engine built around a shared 64-bit round datapath.
//
// The controller sequences the ciphering datapath and the key scheduler. Usage:
//   1. key setup: start=1, op=0 (key setup), alg, key_in  -> wait for done
//   2. encrypt  : start=1, op=1, alg, data_in              -> done, data_out
//   3. decrypt  : start=1, op=2, alg, data_in              -> done, data_out
// start is taken only while busy is low. data_out is valid from the done
// pulse until the next request; done comes 31 clocks (AES) or 22 clocks
// (Camellia) after the accept clock, counting the accept clock, and the
// clock of done can already accept the next block, so blocks stream at one
// per 31 or 22 clocks. Key setup takes 12 (AES) or 7 (Camellia) clocks.
// alg: 0 = AES, 1 = Camellia. Blocks and keys are big-endian byte strings
// (first byte in bits 127:120), as in the AES and Camellia specifications.
// The request format, the key-setup operation and the handshake are this
// design's; the datapath organisation and clock counts follow the document.
module unified_cipher
  import uc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [1:0]   op,
  input  logic         alg,
  input  logic [127:0] key_in,
  input  logic [127:0] data_in,
  output logic [127:0] data_out,
  output logic         busy,
  output logic         done
);
  dp_ctrl_t     dp;
  ks_ctrl_t     ks;
  alg_e         alg_cur;
  logic [127:0] rk, kl128, state;
  logic [63:0]  k64;
  logic [31:0]  sb_to_dp, sb_to_ks;

  cipher_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .op     (op_e'(op)),
    .alg    (alg_e'(alg)),
    .dp, .ks, .alg_cur, .busy, .done
  );

  key_scheduler u_ks (
    .clk, .rst_n,
    .ctrl    (ks),
    .alg     (alg_cur),
    .key_in,
    .dp_state(state),
    .sb_in   (sb_to_ks),
    .sb_out  (sb_to_dp),
    .rk, .k64, .kl128
  );

  cipher_datapath u_dp (
    .clk, .rst_n,
    .ctrl   (dp),
    .data_in, .key_in,
    .rk, .k64, .kl128,
    .sb_in  (sb_to_dp),
    .sb_out (sb_to_ks),
    .state
  );

  assign data_out = state;
endmodule
