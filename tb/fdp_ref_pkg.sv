// fdp_ref_pkg: reference model for the testbenches of the FDPNA operator.
//
// fdp_ref() computes round(sum X_i*Y_i + Z) the straightforward way: every
// product and the addend are converted exactly into one wide two's
// complement fixed-point integer (a full-size, Kulisch-style accumulator)
// and the integer sum is rounded bit by bit. It shares no code with the RTL
// and is written for any formats up to 64 bits and up to 16 products.
// Also holds random operand generators that favour the interesting cases:
// equal exponents (cancellation), subnormals, zeros, infinities and NaNs.
package fdp_ref_pkg;

  localparam int REFW = 4224;   // holds FP64 with 16 products

  typedef logic [63:0] fp_t;
  typedef fp_t fp_vec_t [16];

  // 2^n as a real, by repeated scaling (exact for the exponents used here)
  function automatic real pow2(input int n);
    real v;
    v = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) v = v * 2.0;
    else        for (int i = 0; i < -n; i++) v = v / 2.0;
    return v;
  endfunction

  function automatic int bias(input int e);
    return (1 << (e - 1)) - 1;
  endfunction

  function automatic fp_t mk(input int e, input int m, input logic s,
                             input longint unsigned ex, input longint unsigned fr);
    fp_t v;
    v = (fp_t'(s) << (e + m)) | (fp_t'(ex) << m) | (fr & ((64'd1 << m) - 1));
    return v;
  endfunction

  // field access
  function automatic longint unsigned f_exp(input int e, input int m, input fp_t v);
    return (v >> m) & ((64'd1 << e) - 1);
  endfunction
  function automatic longint unsigned f_frac(input int m, input fp_t v);
    return v & ((64'd1 << m) - 1);
  endfunction
  function automatic logic f_sign(input int e, input int m, input fp_t v);
    return v[e + m];
  endfunction

  // Rounds the exact value (-1)^sgn * mag * 2^lsbw to the output format.
  function automatic void ref_round(
    input logic sgn, input logic [REFW-1:0] mag, input int lsbw,
    input int eout, input int mout, input int rm,
    output fp_t r, output logic [3:0] flags);
    logic [REFW-1:0] q, below;
    int              sh, e_lead, ulp_e, top, emax_out;
    logic            rb, st, inc;
    longint          packed_v;
    emax_out = (1 << eout) - 1;
    flags = 4'b0;
    top = 0;
    for (int b = 0; b < REFW; b++) if (mag[b]) top = b;
    e_lead = top + lsbw;
    if (e_lead + bias(eout) >= 1) ulp_e = e_lead - mout;
    else                          ulp_e = 1 - bias(eout) - mout;
    sh = ulp_e - lsbw;
    q  = mag >> sh;
    rb = (sh > 0) ? mag[sh - 1] : 1'b0;
    below = (sh > 1) ? (mag & ((REFW'(1) << (sh - 1)) - 1)) : '0;
    st = (below != 0);
    case (rm)
      0: inc = rb && (st || q[0]);
      1: inc = 0;
      2: inc = sgn && (rb || st);
      3: inc = !sgn && (rb || st);
      default: inc = rb;
    endcase
    q = q + REFW'(inc);
    if (e_lead + bias(eout) >= 1)
      packed_v = (longint'(e_lead + bias(eout) - 1) <<< mout) + longint'(q[63:0]);
    else
      packed_v = longint'(q[63:0]);
    flags[0] = rb || st;
    flags[1] = (e_lead + bias(eout) < 1) && (rb || st);
    if (e_lead + bias(eout) >= emax_out || packed_v >= (longint'(emax_out) <<< mout)) begin
      flags[2] = 1; flags[0] = 1; flags[1] = 0;
      if (rm == 0 || rm == 4 || (rm == 3 && !sgn) || (rm == 2 && sgn))
        r = mk(eout, mout, sgn, emax_out, 0);
      else
        r = mk(eout, mout, sgn, emax_out - 1, (64'd1 << mout) - 1);
    end else begin
      r = (fp_t'(sgn) << (eout + mout)) | fp_t'(packed_v);
    end
  endfunction

  // Exact reference: r and flags {invalid, overflow, underflow, inexact}.
  // Rounding modes: 0 RNE, 1 RTZ, 2 RDN, 3 RUP, 4 RMM.
  function automatic void fdp_ref(
    input  int n, input int ein, input int min, input int eout, input int mout,
    input  fp_vec_t x, input fp_vec_t y, input fp_t z, input int rm,
    output fp_t r, output logic [3:0] flags);
    logic signed [REFW-1:0] acc, term;
    logic [REFW-1:0]        mag, q, below;
    logic [127:0]           sig;
    int                     lsbw, sh, e_lead, ulp_e, top, emax_in, emax_out;
    logic                   nan_r, inv, pinf, ninf, sgn, rb, st, inc, all_pos, all_neg, any_nz;
    longint unsigned        ex, ey, fx, fy;
    longint                 packed_v;
    logic                   xs, ys;

    emax_in  = (1 << ein) - 1;
    emax_out = (1 << eout) - 1;
    lsbw = 2 * (1 - bias(ein) - min);
    if (1 - bias(eout) - mout < lsbw) lsbw = 1 - bias(eout) - mout;

    nan_r = 0; inv = 0; pinf = 0; ninf = 0; acc = '0;
    all_pos = 1; all_neg = 1; any_nz = 0;
    for (int i = 0; i < n; i++) begin
      ex = f_exp(ein, min, x[i]); fx = f_frac(min, x[i]); xs = f_sign(ein, min, x[i]);
      ey = f_exp(ein, min, y[i]); fy = f_frac(min, y[i]); ys = f_sign(ein, min, y[i]);
      if (ex == emax_in && fx != 0) begin nan_r = 1; if (!fx[min-1]) inv = 1; end
      if (ey == emax_in && fy != 0) begin nan_r = 1; if (!fy[min-1]) inv = 1; end
      if ((ex == emax_in && fx == 0 && ey == 0 && fy == 0) ||
          (ey == emax_in && fy == 0 && ex == 0 && fx == 0)) begin nan_r = 1; inv = 1; end
      if (!(ex == emax_in && fx != 0) && !(ey == emax_in && fy != 0) &&
          (ex == emax_in || ey == emax_in)) begin
        if (xs ^ ys) ninf = 1; else pinf = 1;
      end
      if (xs ^ ys) all_pos = 0; else all_neg = 0;
      if (ex != emax_in && ey != emax_in) begin
        sig = 128'((ex != 0 ? (64'd1 << min) : 64'd0) | fx) *
              128'((ey != 0 ? (64'd1 << min) : 64'd0) | fy);
        if (sig != 0) any_nz = 1;
        sh = (int'(ex == 0 ? 1 : ex) - bias(ein) - min) + (int'(ey == 0 ? 1 : ey) - bias(ein) - min) - lsbw;
        term = REFW'(sig) << sh;
        if (xs ^ ys) acc = acc - term; else acc = acc + term;
      end
    end
    ex = f_exp(eout, mout, z); fx = f_frac(mout, z); xs = f_sign(eout, mout, z);
    if (ex == emax_out && fx != 0) begin nan_r = 1; if (!fx[mout-1]) inv = 1; end
    else if (ex == emax_out) begin if (xs) ninf = 1; else pinf = 1; end
    else begin
      sig = 128'((ex != 0 ? (64'd1 << mout) : 64'd0) | fx);
      if (sig != 0) any_nz = 1;
      sh = int'(ex == 0 ? 1 : ex) - bias(eout) - mout - lsbw;
      term = REFW'(sig) << sh;
      if (xs) acc = acc - term; else acc = acc + term;
    end
    if (xs) all_pos = 0; else all_neg = 0;
    if (pinf && ninf) begin nan_r = 1; inv = 1; end

    flags = 4'b0;
    if (nan_r) begin
      r = mk(eout, mout, 0, emax_out, 64'd1 << (mout - 1));
      flags[3] = inv;
      return;
    end
    if (pinf || ninf) begin
      r = mk(eout, mout, ninf, emax_out, 0);
      return;
    end
    if (acc == 0) begin
      if (!any_nz && (all_pos || all_neg)) r = mk(eout, mout, all_neg, 0, 0);
      else r = mk(eout, mout, rm == 2, 0, 0);
      return;
    end
    ref_round(acc[REFW-1], acc[REFW-1] ? -acc : acc, lsbw, eout, mout, rm, r, flags);
  endfunction

  // Random operand. kind: 0 any finite, 1 exponent near the bias (products
  // overlap, cancellations), 2 subnormal, 3 zero, 4 infinity, 5 NaN,
  // 6 exponent near the top of the range.
  function automatic fp_t rnd_fp(input int e, input int m, input int kind);
    longint unsigned ex, fr;
    logic s;
    s  = 1'($urandom);
    fr = {32'($urandom), 32'($urandom)} & ((64'd1 << m) - 1);
    case (kind)
      0: ex = 1 + ({32'd0, $urandom} % ((64'd1 << e) - 2));
      1: ex = bias(e) - 3 + ($urandom % 7);
      2: ex = 0;
      3: begin ex = 0; fr = 0; end
      4: begin ex = (64'd1 << e) - 1; fr = 0; end
      5: begin ex = (64'd1 << e) - 1; fr = fr | 64'd1; end
      default: ex = (64'd1 << e) - 2 - ($urandom % 4);
    endcase
    return mk(e, m, s, ex, fr);
  endfunction

  // Kind drawn with mostly overlapping exponents and some corner cases.
  function automatic int rnd_kind();
    int v;
    v = int'($urandom % 100);
    if (v < 40) return 1;
    if (v < 70) return 0;
    if (v < 80) return 2;
    if (v < 88) return 3;
    if (v < 92) return 6;
    if (v < 95) return 4;
    return 5;
  endfunction

endpackage
