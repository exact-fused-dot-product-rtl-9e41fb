// fdp_shift_compute: shift values S_i and zone indices k_i of the sorted terms.
//
// With x_j = d_j + p_j + E*_j, the shift of sorted term i into the compressed
// accumulator is
//   S_i = min_{j<=i} x_j - E*_i,
// and k_i, the index of the x_j that gave the minimum, is the zone the term
// belongs to (k_i = i when the term keeps its own zone, otherwise the zone of
// a larger term that it is "close to"). The prefix minimum is computed with a
// Hillis-Steele parallel-prefix network of min-sel nodes: at level l,
// position i >= 2^l combines with position i - 2^l; log2(N+1) levels in all.
// S_0 = d_0 + p_0 and k_0 = 0 come out of the same formula.
// S_i is a distance from the left end of the accumulator to the MSB of M*_i,
// in the range 0 .. d_i + p_i. The formulas and the network shape are the
// operator's; the tie rule in fdp_min_sel is this design's. Purely
// combinational.
module fdp_shift_compute
  import fdp_pkg::*;
#(
  parameter int N  = 4,
  parameter int W  = 48,
  parameter int EW = 11,
  localparam int NT  = N + 1,
  localparam int IW  = (NT > 1) ? $clog2(NT) : 1,
  localparam int SHW = $clog2(fdp_d(N, W, N) + fdp_p(N, N) + 1),
  localparam int XW  = EW + SHW + 2,
  localparam int LV  = $clog2(NT)
) (
  input  logic signed [EW-1:0] e_s [NT],
  output logic [SHW-1:0]       s   [NT],
  output logic [IW-1:0]        k   [NT]
);
  // one block per prefix level; g_lvl[l].x/.kx hold the values after level l
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic signed [XW-1:0] x  [NT];
    logic [IW-1:0]        kx [NT];
    for (genvar i = 0; i < NT; i++) begin : g_pos
      if (l == 0) begin : g_init
        // level 0: x_i = d_i + p_i + E*_i, k_i = i
        assign x[i]  = XW'(fdp_d(N, W, i) + fdp_p(N, i)) + XW'(e_s[i]);
        assign kx[i] = IW'(i);
      end else if (i >= (1 << (l - 1))) begin : g_node
        fdp_min_sel #(.XW(XW), .KW(IW)) u_ms (
          .xa(g_lvl[l-1].x[i - (1 << (l - 1))]), .ka(g_lvl[l-1].kx[i - (1 << (l - 1))]),
          .xb(g_lvl[l-1].x[i]),                  .kb(g_lvl[l-1].kx[i]),
          .xo(x[i]),                             .ko(kx[i])
        );
      end else begin : g_pass
        assign x[i]  = g_lvl[l-1].x[i];
        assign kx[i] = g_lvl[l-1].kx[i];
      end
    end
  end

  logic signed [XW-1:0] sdiff [NT];
  for (genvar i = 0; i < NT; i++) begin : g_s
    assign sdiff[i] = g_lvl[LV].x[i] - XW'(e_s[i]);
    assign s[i]     = sdiff[i][SHW-1:0];
    assign k[i]     = g_lvl[LV].kx[i];
  end
endmodule
