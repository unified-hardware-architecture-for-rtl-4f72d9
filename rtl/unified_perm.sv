// unified_perm: the shared 64-bit permutation layer of AES and Camellia.
//
// One block computes, selected by mode, either MixColumns on two AES columns,
// InvMixColumns on two AES columns, or the Camellia P-function on 8 bytes.
// Bytes are numbered x[0] (bits 63:56) to x[7] (bits 7:0); for AES bytes 0..3
// form the first column and 4..7 the second, for Camellia x[i] is z(i+1).
// As in the document the matrices are split into {01}, {02} and {04,08}
// element matrices whose terms are computed once:
//   s   = x0^x1^x2^x3              column sum
//   e_i = s ^ x_i                  the {01}-element matrix (x_{i+1}^x_{i+2}^x_{i+3})
//   d_i = x_i ^ x_{i+1}            input of the {02} matrix
//   MixColumns     z_i = e_i ^ 02*d_i
//   InvMixColumns  y_i = z_i ^ 04*(x_i ^ x_{i+2}) ^ 08*s
//   P-function     w_i = s_lo ^ x_{i+1} ^ e_hi_i,  w_{4+i} = d_lo_i ^ e_hi_i
// so MixColumns is a sub-result of InvMixColumns, and the P-function reuses
// the {01} terms of the second column and the d terms of the first.
// Purely combinational.
module unified_perm
  import uc_pkg::*;
(
  input  logic [63:0] x,
  input  perm_mode_e  mode,
  output logic [63:0] y
);
  logic [7:0] b    [8];
  logic [7:0] s    [2];
  logic [7:0] e    [8];
  logic [7:0] d    [8];
  logic [7:0] z    [8];
  logic [7:0] yi   [8];
  logic [7:0] w    [8];

  always_comb begin
    for (int i = 0; i < 8; i++) b[i] = x[63 - 8*i -: 8];
    for (int c = 0; c < 2; c++) begin
      s[c] = b[4*c] ^ b[4*c+1] ^ b[4*c+2] ^ b[4*c+3];
      for (int i = 0; i < 4; i++) begin
        e[4*c+i] = s[c] ^ b[4*c+i];
        d[4*c+i] = b[4*c+i] ^ b[4*c+((i+1)%4)];
        z[4*c+i] = e[4*c+i] ^ xtime(d[4*c+i]);
        yi[4*c+i] = z[4*c+i]
                  ^ xtime(xtime(b[4*c+i] ^ b[4*c+((i+2)%4)]))
                  ^ xtime(xtime(xtime(s[c])));
      end
    end
    for (int i = 0; i < 4; i++) begin
      w[i]   = s[0] ^ b[(i+1)%4] ^ e[4+i];
      w[4+i] = d[i] ^ e[4+i];
    end
    for (int i = 0; i < 8; i++) begin
      unique case (mode)
        PM_MC:   y[63 - 8*i -: 8] = z[i];
        PM_IMC:  y[63 - 8*i -: 8] = yi[i];
        default: y[63 - 8*i -: 8] = w[i];
      endcase
    end
  end
endmodule
