// flinv_kw: Camellia FL^-1 function merged with key whitening.
//
// FL^-1 on y = yL||yR with key kl = klH||klL (32-bit halves):
//   xL = (yR | klL) ^ yL,   xR = ((xL & klH) <<< 1) ^ yR.
// As in fl_kw, the closing XORs double as key whitening: sel_kadd = 1 gives
// x = y ^ kl (klL goes through >>>1 and the shared <<<1), and en = 0 passes the
// input unchanged. Follows the figure of the merged FL^-1 block; gating both
// XORs with en is this design's reading of it. Combinational.
module flinv_kw
  import uc_pkg::*;
(
  input  logic [63:0] x,
  input  logic [63:0] kl,
  input  logic        en,
  input  logic        sel_kadd,
  output logic [63:0] y
);
  logic [31:0] yl_in, yr_in, kh, kl_lo, t_l, xl, t_r;

  always_comb begin
    yl_in = x[63:32];
    yr_in = x[31:0];
    kh    = kl[63:32];
    kl_lo = kl[31:0];
    t_l   = sel_kadd ? kh : (yr_in | kl_lo);
    t_l   = en ? t_l : '0;
    xl    = yl_in ^ t_l;
    t_r   = rotl32_1(sel_kadd ? {kl_lo[0], kl_lo[31:1]} : (xl & kh));
    t_r   = en ? t_r : '0;
    y     = {xl, yr_in ^ t_r};
  end
endmodule
