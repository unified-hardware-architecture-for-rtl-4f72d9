// fl_kw: Camellia FL function merged with key whitening.
//
// FL on x = xL||xR with key kl = klH||klL (32-bit halves):
//   yR = ((xL & klH) <<< 1) ^ xR,   yL = (yR | klL) ^ xL.
// The two XORs that FL ends with are reused for key whitening: with
// sel_kadd = 1 the right XOR receives klL (passed through a >>>1 before the
// shared <<<1) and the left XOR receives klH, so y = x ^ kl. With en = 0 both
// XOR inputs are zero and x passes unchanged. This follows the figure of the
// merged FL block (signals En and Sel_FL_Kadd); gating both XORs with en is this
// design's reading of it. Combinational.
module fl_kw
  import uc_pkg::*;
(
  input  logic [63:0] x,
  input  logic [63:0] kl,
  input  logic        en,
  input  logic        sel_kadd,
  output logic [63:0] y
);
  logic [31:0] xl, xr, kh, kl_lo, t_r, yr, t_l;

  always_comb begin
    xl    = x[63:32];
    xr    = x[31:0];
    kh    = kl[63:32];
    kl_lo = kl[31:0];
    t_r   = rotl32_1(sel_kadd ? {kl_lo[0], kl_lo[31:1]} : (xl & kh));
    t_r   = en ? t_r : '0;
    yr    = xr ^ t_r;
    t_l   = sel_kadd ? kh : (yr | kl_lo);
    t_l   = en ? t_l : '0;
    y     = {xl ^ t_l, yr};
  end
endmodule
