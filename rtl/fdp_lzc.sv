// fdp_lzc: leading zero counter. cnt is the number of zeros above the most
// significant 1 of a; it equals WIDTH when a is zero. Combinational.
module fdp_lzc #(
  parameter int WIDTH = 253,
  localparam int CW = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] a,
  output logic [CW-1:0]    cnt
);
  always_comb begin
    cnt = CW'(WIDTH);
    for (int i = 0; i < WIDTH; i++)
      if (a[i]) cnt = CW'(WIDTH - 1 - i);
  end
endmodule
