// fdp_min_sel: one node of the parallel-prefix shift computation.
//
// Takes two (x, k) pairs, one from a term further left (a, larger exponent)
// and one from the current position (b), and keeps the pair with the smaller
// x together with its zone index k. On a tie the current position wins, so a
// term whose own zone gives the same shift keeps its own zone (both choices
// give the same shift and the same final exponent). Combinational.
module fdp_min_sel #(
  parameter int XW = 16,   // width of the signed x values
  parameter int KW = 3     // width of the zone index
) (
  input  logic signed [XW-1:0] xa,
  input  logic [KW-1:0]        ka,
  input  logic signed [XW-1:0] xb,
  input  logic [KW-1:0]        kb,
  output logic signed [XW-1:0] xo,
  output logic [KW-1:0]        ko
);
  always_comb begin
    if (xa < xb) begin
      xo = xa;
      ko = ka;
    end else begin
      xo = xb;
      ko = kb;
    end
  end
endmodule
