// fdp_product: one product term X_i * Y_i of the FDPNA operator.
//
// The implicit bit (0 for a subnormal or zero, 1 otherwise) is prepended to
// each fraction, the two significands are multiplied exactly, the product is
// negated when the signs differ, and the exponents are added. As in the
// operator's architecture, a product is kept as an exponent E and a signed,
// non-normalised significand M with two integer bits:
//   X*Y = M * 2^(E - (W-2)),  M = (mx*my) << (W - 2 - 2*MIN).
// E is the signed true exponent (biases removed). M is a (W+1)-bit two's
// complement value; the extra sign bit is this implementation's choice.
// Infinities and NaNs are only classified here (cls); their M is zero.
// nz is the "significand is non-zero" bit appended to the sort key.
// Purely combinational.
module fdp_product
  import fdp_pkg::*;
#(
  parameter int EIN = 8,                 // exponent bits of X, Y
  parameter int MIN = 23,                // fraction bits of X, Y
  parameter int W   = 2 * (1 + MIN),     // common significand width w
  parameter int EW  = EIN + 3            // internal exponent width
) (
  input  logic [EIN+MIN:0]       x,
  input  logic [EIN+MIN:0]       y,
  output logic signed [EW-1:0]   e,
  output logic signed [W:0]      m,
  output logic                   nz,
  output fdp_cls_t               cls
);
  localparam int BIAS = (1 << (EIN - 1)) - 1;
  localparam int PW   = 2 * (MIN + 1);

  logic [EIN-1:0] ex, ey;
  logic [MIN:0]   sx, sy;
  logic [PW-1:0]  prod;
  logic [W-1:0]   mag;
  logic           xsub, ysub, xspec, yspec, xzero, yzero;
  logic           xnan, ynan, xinf, yinf, sgn;

  always_comb begin
    ex    = x[MIN +: EIN];
    ey    = y[MIN +: EIN];
    xsub  = (ex == '0);
    ysub  = (ey == '0);
    xspec = (ex == '1);
    yspec = (ey == '1);
    xzero = xsub && (x[MIN-1:0] == '0);
    yzero = ysub && (y[MIN-1:0] == '0);
    xnan  = xspec && (x[MIN-1:0] != '0);
    ynan  = yspec && (y[MIN-1:0] != '0);
    xinf  = xspec && (x[MIN-1:0] == '0);
    yinf  = yspec && (y[MIN-1:0] == '0);
    sgn   = x[EIN+MIN] ^ y[EIN+MIN];

    sx   = {~xsub, x[MIN-1:0]};
    sy   = {~ysub, y[MIN-1:0]};
    prod = PW'(sx) * PW'(sy);
    mag  = (xspec || yspec) ? '0 : W'(prod) << (W - PW);
    m    = sgn ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    nz   = (mag != '0);

    // true exponent: (ex_eff - BIAS) + (ey_eff - BIAS), ex_eff = 1 for subnormals
    e = EW'($signed({1'b0, (xsub ? EIN'(1) : ex)}))
      + EW'($signed({1'b0, (ysub ? EIN'(1) : ey)}))
      - EW'(2 * BIAS);

    cls.nan  = xnan || ynan;
    cls.snan = (xnan && !x[MIN-1]) || (ynan && !y[MIN-1]);
    cls.inf  = (xinf || yinf) && !(xnan || ynan);
    cls.inv  = (xinf && yzero) || (yinf && xzero);
    cls.sign = sgn;
  end
endmodule
