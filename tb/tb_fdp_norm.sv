// tb_fdp_norm: checks sign-magnitude conversion, leading-zero count and
// normalisation on a 253-bit accumulator. The leading one is placed at a
// random position; the test checks the sign, that the normalised word has
// its MSB set, that shifting it back right by L gives |acc| exactly, and the
// zero case.
module tb_fdp_norm;
  localparam int WC = 253;

  logic signed [WC:0] acc;
  logic sign, zero;
  logic [7:0] l;
  logic [WC-1:0] mag_n;

  fdp_norm #(.WC(WC)) dut (.acc, .sign, .zero, .l, .mag_n);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] v;
    logic [WC-1:0] mag;
    int pos;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
      pos = int'($urandom % WC);
      mag = WC'(v) & ((WC'(1) << pos) - 1) | (WC'(1) << pos);
      if (t % 50 == 0) mag = '0;
      acc = ($urandom % 2) ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
      #1;
      checks++;
      if (mag == 0) begin
        if (!zero || int'(l) != WC) failures++;
      end else if (sign != acc[WC] || zero || !mag_n[WC-1] || (mag_n >> l) != mag ||
                   int'(l) != WC - 1 - pos) begin
        failures++;
        if (failures < 10) $display("MISMATCH pos=%0d l=%0d", pos, l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
