// fdp_round: the single rounding of the FDPNA operator, with special values
// and IEEE 754 flags.
//
// Input is the normalised magnitude of the exact sum (leading one at the MSB
// of mag_n), its sign and the exponent e_res of that leading one. The biased
// exponent is ER = e_res + bias. When ER < 1 the significand is shifted right
// by 1 - ER more bits (subnormal result). The top MOUT+1 bits then form the
// significand, the next bit is the round bit and the OR of the rest is the
// sticky bit. The increment is added to the packed {exponent, fraction} word
// so that a carry out of the fraction moves to the next binade naturally.
//
// Choices of this design (the operator only says that rounding, overflow,
// NaN and the flags are handled): five IEEE rounding modes; overflow gives
// infinity or the largest finite number according to the mode; tininess is
// detected before rounding (underflow = tiny and inexact); NaN results are
// the canonical quiet NaN. An exact zero sum takes the sign zero_sign that
// the caller works out from the zero terms. Combinational.
module fdp_round
  import fdp_pkg::*;
#(
  parameter int EOUT = 8,
  parameter int MOUT = 23,
  parameter int WC   = 253,   // width of the normalised magnitude
  parameter int XW   = 21     // width of e_res
) (
  input  logic                 sign,
  input  logic                 zero,
  input  logic [WC-1:0]        mag_n,
  input  logic signed [XW-1:0] e_res,
  input  fdp_rm_e              rm,
  input  logic                 sp_nan,     // result is NaN
  input  logic                 sp_invalid, // invalid operation
  input  logic                 sp_inf,     // result is an infinity
  input  logic                 sp_sign,    // sign of that infinity
  input  logic                 zero_sign,  // sign of an exact zero result
  output logic [EOUT+MOUT:0]   r,
  output fdp_flags_t           flags
);
  localparam int BIAS = (1 << (EOUT - 1)) - 1;
  localparam int EMAX = (1 << EOUT) - 1;      // all-ones biased exponent
  localparam int VW   = WC + MOUT + 3;
  localparam int SW   = $clog2(MOUT + 4);
  localparam int RW   = XW + 2;

  logic signed [RW-1:0] er;
  logic                 tiny, ovf_pre, rb, st, inc, lsb, ovf, away;
  logic [SW-1:0]        sh;
  logic [VW-1:0]        v;
  logic [MOUT-1:0]      frac;
  logic [EOUT+MOUT-1:0] packed_r, rounded;

  always_comb begin
    er      = RW'(e_res) + RW'(BIAS);
    tiny    = (er < RW'(1));
    ovf_pre = (er >= RW'(EMAX));
    if (!tiny)                         sh = '0;
    else if (er <= RW'(1 - (MOUT + 3))) sh = SW'(MOUT + 3);
    else                               sh = SW'(RW'(1) - er);

    v   = {mag_n, {(MOUT + 3){1'b0}}} >> sh;
    frac = v[VW-2 -: MOUT];   // bit VW-1 is the leading (implicit) bit
    rb  = v[VW-MOUT-2];
    st  = |v[VW-MOUT-3:0];
    lsb = frac[0];

    unique case (rm)
      RM_RNE:  inc = rb && (st || lsb);
      RM_RTZ:  inc = 1'b0;
      RM_RDN:  inc = sign && (rb || st);
      RM_RUP:  inc = !sign && (rb || st);
      RM_RMM:  inc = rb;
      default: inc = rb && (st || lsb);
    endcase

    packed_r = {(tiny ? EOUT'(0) : er[EOUT-1:0]), frac};
    rounded  = packed_r + (EOUT+MOUT)'(inc);
    ovf      = ovf_pre || (rounded[MOUT +: EOUT] == '1);
    // rounding modes that carry an overflow to infinity
    away     = (rm == RM_RNE) || (rm == RM_RMM) ||
               (rm == RM_RUP && !sign) || (rm == RM_RDN && sign);

    flags = '0;
    if (sp_nan) begin
      r             = {1'b0, {EOUT{1'b1}}, 1'b1, {(MOUT-1){1'b0}}};
      flags.invalid = sp_invalid;
    end else if (sp_inf) begin
      r = {sp_sign, {EOUT{1'b1}}, {MOUT{1'b0}}};
    end else if (zero) begin
      r = {zero_sign, {(EOUT+MOUT){1'b0}}};
    end else if (ovf) begin
      r              = away ? {sign, {EOUT{1'b1}}, {MOUT{1'b0}}}
                            : {sign, {(EOUT-1){1'b1}}, 1'b0, {MOUT{1'b1}}};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else begin
      r               = {sign, rounded};
      flags.inexact   = rb || st;
      flags.underflow = tiny && (rb || st);
    end
  end
endmodule
