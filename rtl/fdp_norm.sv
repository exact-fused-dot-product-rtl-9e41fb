// fdp_norm: converts the compressed sum RM_full to sign-magnitude, counts the
// leading zeros L of the magnitude and shifts it left so that its leading one
// becomes the MSB (RM_full_normalised).
//
// The accumulator word has WC+1 bits: an extra sign bit followed by the WC
// bit positions 0..WC-1 of the zones, so L is directly a zone position.
// L = WC (and zero = 1) when the exact sum is zero. The extra sign bit and
// the simple priority-loop LZC are choices of this design. Combinational.
module fdp_norm #(
  parameter int WC = 253,
  localparam int LW = $clog2(WC + 1)
) (
  input  logic signed [WC:0] acc,
  output logic               sign,
  output logic               zero,
  output logic [LW-1:0]      l,
  output logic [WC-1:0]      mag_n
);
  logic [WC-1:0] neg;
  logic [WC-1:0] mag;

  always_comb begin
    sign = acc[WC];
    neg  = -acc[WC-1:0];
    mag  = sign ? neg : acc[WC-1:0];
    zero = (mag == '0);
  end

  fdp_lzc #(.WIDTH(WC)) u_lzc (.a(mag), .cnt(l));

  assign mag_n = mag << l;
endmodule
