// fdp_adder_tree: the '+' of the compressed sum: adds the N+1 aligned,
// sign-extended significands into RM_full.
//
// The operator sums the terms in a compressor tree over the bit heap; this
// design writes it as a balanced binary tree of two's complement adders,
// ceil(log2 NT) levels deep, which synthesis may turn into such a tree.
// The sum is exact: the protection bits of each zone and the extra sign bit
// guarantee it cannot overflow the WA-bit word.
// Combinational.
module fdp_adder_tree #(
  parameter int NT = 5,    // number of operands
  parameter int WA = 254,  // operand and result width
  localparam int LV = (NT > 1) ? $clog2(NT) : 0
) (
  input  logic signed [WA-1:0] t [NT],
  output logic signed [WA-1:0] sum
);
  // number of partial sums at level l
  function automatic int cnt(input int l);
    int c;
    c = NT;
    for (int j = 0; j < l; j++) c = (c + 1) / 2;
    return c;
  endfunction

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic signed [WA-1:0] ps [cnt(l)];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < NT; i++) begin : g_i
        assign ps[i] = t[i];
      end
    end else begin : g_add
      for (genvar i = 0; i < cnt(l); i++) begin : g_i
        if (2 * i + 1 < cnt(l - 1)) begin : g_pair
          assign ps[i] = g_lvl[l-1].ps[2*i] + g_lvl[l-1].ps[2*i+1];
        end else begin : g_odd
          assign ps[i] = g_lvl[l-1].ps[2*i];
        end
      end
    end
  end

  assign sum = g_lvl[LV].ps[0];
endmodule
