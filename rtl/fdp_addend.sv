// fdp_addend: splits the addend Z into the common term format of the
// FDPNA operator (exponent E_N, signed significand M_N).
//
// The implicit bit is prepended to the fraction and the significand is
// placed so that its leading bit has weight 2^0 inside a W-bit field with
// two integer bits: the extra MSB stands for the overflow bit of a product,
// and any extra LSBs (homogeneous case, or mixed precision when products
// are wider) are zero. Then Z = M * 2^(E - (W-2)) with E = ez_eff - bias_out,
// which is the same scale as the products. M is negated for a negative Z and
// carried as a (W+1)-bit two's complement value (the sign bit is this
// implementation's choice). Infinities and NaNs are classified in cls.
// Purely combinational.
module fdp_addend
  import fdp_pkg::*;
#(
  parameter int EOUT = 8,                 // exponent bits of Z and R
  parameter int MOUT = 23,                // fraction bits of Z and R
  parameter int W    = 2 * (1 + MOUT),    // common significand width w
  parameter int EW   = EOUT + 3           // internal exponent width
) (
  input  logic [EOUT+MOUT:0]     z,
  output logic signed [EW-1:0]   e,
  output logic signed [W:0]      m,
  output logic                   nz,
  output fdp_cls_t               cls
);
  localparam int BIAS = (1 << (EOUT - 1)) - 1;

  logic [EOUT-1:0] ez;
  logic            zsub, zspec;
  logic [W-1:0]    mag;

  always_comb begin
    ez    = z[MOUT +: EOUT];
    zsub  = (ez == '0);
    zspec = (ez == '1);
    mag   = zspec ? '0 : W'({~zsub, z[MOUT-1:0]}) << (W - 2 - MOUT);
    m     = z[EOUT+MOUT] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    nz    = (mag != '0);
    e     = EW'($signed({1'b0, (zsub ? EOUT'(1) : ez)})) - EW'(BIAS);

    cls.nan  = zspec && (z[MOUT-1:0] != '0);
    cls.snan = zspec && (z[MOUT-1:0] != '0) && !z[MOUT-1];
    cls.inf  = zspec && (z[MOUT-1:0] == '0);
    cls.inv  = 1'b0;
    cls.sign = z[EOUT+MOUT];
  end
endmodule
