// tb_fdp_final_exp: checks the final-exponent computation for N = 4, w = 48
// (zone boundaries d = 0, 52, 103, 154, 204, w_compressed = 253, p = 3, 2, 2,
// 1, 0). For a random leading-zero count L and a random valid zone map k,
// the bit at L belongs to the zone group of k_i; its weight is worked out by
// walking from the significand slot of that group, whose leftmost bit has
// weight 2^(E*_k + 1).
module tb_fdp_final_exp;
  localparam int N = 4, NT = 5, W = 48, EW = 11, XW = 21;
  localparam int D [NT+1] = '{0, 52, 103, 154, 204, 253};
  localparam int P [NT] = '{3, 2, 2, 1, 0};

  logic [7:0] l;
  logic signed [EW-1:0] e_s [NT];
  logic [2:0] k [NT];
  logic signed [XW-1:0] e_res;
  logic [2:0] zone;

  fdp_final_exp #(.N(N), .W(W), .EW(EW)) dut (.l, .e_s, .k, .e_res, .zone);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev [NT];
    int kv [NT];
    int li, zi, g, w;
    for (int t = 0; t < 5000; t++) begin
      ev[0] = int'($urandom % 400) - 200;
      kv[0] = 0;
      for (int i = 1; i < NT; i++) begin
        ev[i] = ev[i-1] - int'($urandom % 60);
        kv[i] = ($urandom % 2) ? i : kv[i-1];
      end
      li = int'($urandom % 253);
      for (int i = 0; i < NT; i++) begin e_s[i] = EW'(ev[i]); k[i] = 3'(kv[i]); end
      l = 8'(li);
      #1;
      zi = 0;
      while (li >= D[zi + 1]) zi++;
      g = kv[zi];
      w = ev[g] + 1;
      for (int pos = D[g] + P[g]; pos < li; pos++) w--;
      for (int pos = li; pos < D[g] + P[g]; pos++) w++;
      checks++;
      if (int'(zone) != zi || int'(e_res) != w) begin
        failures++;
        if (failures < 10) $display("MISMATCH l=%0d zone=%0d/%0d e=%0d/%0d", li, zone, zi, e_res, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
