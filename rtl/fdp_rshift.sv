// fdp_rshift: places one sorted signed significand M*_i into the
// compressed accumulator.
//
// The (W+1)-bit two's complement significand is first put at the left end of
// the (WC+1)-bit accumulator word (its sign bit on the accumulator's extra
// sign bit, its MSB at position 0), then shifted right arithmetically by S_i,
// so that its MSB lands at position S_i. Since term i can only land in zones
// 0..i, the shift never exceeds MAX_SHIFT = d_i + p_i and the shifter only
// takes the SHW = ceil(log2(MAX_SHIFT+1)) low bits of S. The shifter itself is
// only W+1+MAX_SHIFT bits wide, the left part of the word that term i can
// reach; the bits to its right are constant zeros. This gives the staircase
// of shifter and bit-heap sizes the operator describes: term 0 is W+1+p_0
// bits wide, the last term almost the whole word, and the adder tree sees
// the constant zeros and needs no logic for them. Combinational.
module fdp_rshift #(
  parameter int W         = 48,   // significand width w (plus one sign bit)
  parameter int WC        = 253,  // compressed accumulator width w_compressed
  parameter int MAX_SHIFT = 52,   // d_i + p_i
  parameter int SHW       = 6     // width of the shift input: enough for MAX_SHIFT
) (
  input  logic signed [W:0]   m,
  input  logic [SHW-1:0]      s,
  output logic signed [WC:0]  t
);
  localparam int TW = W + 1 + MAX_SHIFT;   // bits that term i can occupy

  logic signed [TW-1:0] win;

  always_comb begin
    win              = '0;
    win[TW-1 -: W+1] = m;
    win              = win >>> s;
    t                = '0;
    t[WC -: TW]      = win;
  end

  // the shift computation never places term i right of its own zone
  always_comb assert (int'(s) <= MAX_SHIFT)
    else $error("fdp_rshift: shift %0d exceeds %0d", s, MAX_SHIFT);
endmodule
