// fdp_final_exp: exponent of the leading one of the compressed sum.
//
// The leading-zero count L is compared with all zone boundaries d_j to find
// the zone i with d_i <= L < d_{i+1}. That zone belongs to the group of
// zone k_i, whose significand slot d_{k_i} + p_{k_i} holds the 2^1 bit of a
// term of exponent E*_{k_i}, so the leading one has exponent
//   E = E*_{k_i} + 1 - (L - (d_{k_i} + p_{k_i})).
// The formula is the operator's own; reading the zone range as half-open
// (d_i <= L < d_{i+1}) is this design's. E is meaningless when the sum is zero (L = w_compressed); the rounding
// stage handles that case. Combinational.
module fdp_final_exp
  import fdp_pkg::*;
#(
  parameter int N  = 4,
  parameter int W  = 48,
  parameter int EW = 11,
  localparam int NT = N + 1,
  localparam int IW = (NT > 1) ? $clog2(NT) : 1,
  localparam int WC = fdp_d(N, W, N + 1),
  localparam int LW = $clog2(WC + 1),
  localparam int XW = EW + LW + 2
) (
  input  logic [LW-1:0]        l,
  input  logic signed [EW-1:0] e_s [NT],
  input  logic [IW-1:0]        k   [NT],
  output logic signed [XW-1:0] e_res,
  output logic [IW-1:0]        zone    // zone i of the leading one
);
  logic [IW-1:0]        kk;
  logic signed [XW-1:0] slot;

  always_comb begin
    zone = '0;
    for (int i = 1; i < NT; i++)
      if (int'(l) >= fdp_d(N, W, i)) zone = IW'(i);
    kk   = k[zone];
    slot = '0;
    for (int j = 0; j < NT; j++)
      if (kk == IW'(j)) slot = XW'(fdp_d(N, W, j) + fdp_p(N, j));
    e_res = XW'(e_s[kk]) + XW'(1) - (XW'(l) - slot);
  end
endmodule
