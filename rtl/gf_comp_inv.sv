// gf_comp_inv: multiplicative inverse in the composite field GF((2^4)^2).
//
// This is the one inverter that every S-box mode of the unified S-box shares.
// The input c = a + b*beta (a = c[3:0], b = c[7:4]) lives in GF(2^4)[beta] with
// beta^2 = beta + n, n = alpha^3 + 1, over GF(2^4) with alpha^4 = alpha + 1
// (the field Camellia uses for its S-box). The inverse is computed through
// the norm:  d = a^2 + a*b + n*b^2,  c^-1 = d^-1 * ((a + b) + b*beta).
// Zero maps to zero. Purely combinational, 8 bits in, 8 bits out.
// The document names this block only; the norm-based structure is this
// design's choice.
module gf_comp_inv
  import uc_pkg::*;
(
  input  logic [7:0] c,
  output logic [7:0] c_inv
);
  localparam logic [3:0] N = 4'h9;  // alpha^3 + 1

  logic [3:0] a, b, d, d_inv;

  always_comb begin
    a     = c[3:0];
    b     = c[7:4];
    d     = gf16_sq(a) ^ gf16_mul(a, b) ^ gf16_mul(N, gf16_sq(b));
    d_inv = gf16_inv(d);
    c_inv = {gf16_mul(d_inv, b), gf16_mul(d_inv, a ^ b)};
  end
endmodule
