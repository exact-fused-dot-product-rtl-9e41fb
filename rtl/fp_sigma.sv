// fp_sigma: the compressed FP-Sigma component. Adds N+1 floating-point terms
// (E_i, M_i) exactly and rounds the sum once.
//
// Data path (all combinational):
//   1. fdp_exp_sort      sorts the terms by {exponent, non-zero bit}.
//   2. fdp_shift_compute computes the shifts S_i and zone indices k_i with a
//                        parallel-prefix min network.
//   3. fdp_rshift        places each sorted significand at position S_i of a
//                        w_compressed-bit accumulator (plus one sign bit).
//   4. fdp_adder_tree    sums them: RM_full, exact.
//   5. fdp_norm          sign-magnitude conversion, LZC (L), left shift.
//   6. fdp_final_exp     exponent of the leading one from L, d_i and k_i.
//   7. fdp_round         subnormalisation, rounding, specials, flags.
// The sum of a zone holding several terms may carry into its p_i protection
// bits; the bits omitted between zones are all equal in the full-size sum, so
// the compressed word keeps every bit that rounding needs.
// Special values are resolved here from the term classes: any NaN operand or
// an infinity times zero, or infinities of both signs, give NaN; otherwise an
// infinity gives an infinity. The sign of an exact zero follows IEEE 754 sum
// rules (the common sign if all terms are zeros of one sign, else +0, or -0
// when rounding toward -infinity); this is a design choice.
module fp_sigma
  import fdp_pkg::*;
#(
  parameter int N    = 4,
  parameter int EOUT = 8,
  parameter int MOUT = 23,
  parameter int W    = 48,
  parameter int EW   = 11,
  localparam int NT  = N + 1,
  localparam int IW  = (NT > 1) ? $clog2(NT) : 1,
  localparam int WC  = fdp_d(N, W, N + 1),
  localparam int SHW = $clog2(fdp_d(N, W, N) + fdp_p(N, N) + 1),
  localparam int LW  = $clog2(WC + 1),
  localparam int XW  = EW + LW + 2
) (
  input  logic signed [EW-1:0] e   [NT],
  input  logic signed [W:0]    m   [NT],
  input  logic                 nz  [NT],
  input  fdp_cls_t             cls [NT],
  input  fdp_rm_e              rm,
  output logic [EOUT+MOUT:0]   r,
  output fdp_flags_t           flags
);
  logic signed [EW-1:0] e_s   [NT];
  logic signed [W:0]    m_s   [NT];
  logic [SHW-1:0]       s     [NT];
  logic [IW-1:0]        k     [NT];
  logic signed [WC:0]   t     [NT];
  logic signed [WC:0]   acc;
  logic                 sgn, zero;
  logic [LW-1:0]        l;
  logic [WC-1:0]        mag_n;
  logic signed [XW-1:0] e_res;

  fdp_exp_sort #(.N(N), .W(W), .EW(EW)) u_sort (
    .e(e), .m(m), .nz(nz), .e_s(e_s), .m_s(m_s), .idx_s()
  );

  fdp_shift_compute #(.N(N), .W(W), .EW(EW)) u_shift (
    .e_s(e_s), .s(s), .k(k)
  );

  for (genvar i = 0; i < NT; i++) begin : g_rsh
    localparam int MS  = fdp_d(N, W, i) + fdp_p(N, i);
    localparam int MSW = (MS > 0) ? $clog2(MS + 1) : 1;
    fdp_rshift #(.W(W), .WC(WC), .MAX_SHIFT(MS), .SHW(MSW)) u_rsh (
      .m(m_s[i]), .s(s[i][MSW-1:0]), .t(t[i])
    );
  end

  fdp_adder_tree #(.NT(NT), .WA(WC + 1)) u_add (.t(t), .sum(acc));

  fdp_norm #(.WC(WC)) u_norm (
    .acc(acc), .sign(sgn), .zero(zero), .l(l), .mag_n(mag_n)
  );

  fdp_final_exp #(.N(N), .W(W), .EW(EW)) u_fexp (
    .l(l), .e_s(e_s), .k(k), .e_res(e_res), .zone()
  );

  // special values and the sign of an exact zero
  logic sp_nan, sp_inv, sp_inf, sp_sign, zero_sign;
  logic pinf, ninf, any_nz, all_pos, all_neg;
  always_comb begin
    sp_nan  = 1'b0;
    sp_inv  = 1'b0;
    pinf    = 1'b0;
    ninf    = 1'b0;
    any_nz  = 1'b0;
    all_pos = 1'b1;
    all_neg = 1'b1;
    for (int i = 0; i < NT; i++) begin
      sp_nan  = sp_nan | cls[i].nan | cls[i].inv;
      sp_inv  = sp_inv | cls[i].snan | cls[i].inv;
      pinf    = pinf | (cls[i].inf & ~cls[i].sign);
      ninf    = ninf | (cls[i].inf & cls[i].sign);
      any_nz  = any_nz | nz[i];
      all_pos = all_pos & ~cls[i].sign;
      all_neg = all_neg & cls[i].sign;
    end
    if (pinf && ninf) begin
      sp_nan = 1'b1;
      sp_inv = 1'b1;
    end
    sp_inf  = pinf | ninf;
    sp_sign = ninf;
    if (!any_nz && (all_pos || all_neg)) zero_sign = all_neg;
    else                                 zero_sign = (rm == RM_RDN);
  end

  fdp_round #(.EOUT(EOUT), .MOUT(MOUT), .WC(WC), .XW(XW)) u_round (
    .sign(sgn), .zero(zero), .mag_n(mag_n), .e_res(e_res), .rm(rm),
    .sp_nan(sp_nan), .sp_invalid(sp_inv), .sp_inf(sp_inf), .sp_sign(sp_sign),
    .zero_sign(zero_sign), .r(r), .flags(flags)
  );
endmodule
