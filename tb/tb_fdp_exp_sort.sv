// tb_fdp_exp_sort: checks the exponent sort with N = 4 (5 terms). Exponents
// are drawn from a narrow range so that ties are frequent. The output must be
// a permutation of the input (checked through the returned indices), ordered
// by exponent, non-zero terms before zero terms of equal exponent, and equal
// keys in input order; each significand must travel with its exponent.
module tb_fdp_exp_sort;
  localparam int N = 4, NT = 5, W = 48, EW = 11;

  logic signed [EW-1:0] e [NT], e_s [NT];
  logic signed [W:0] m [NT], m_s [NT];
  logic nz [NT];
  logic [2:0] idx_s [NT];

  fdp_exp_sort #(.N(N), .W(W), .EW(EW)) dut (.e, .m, .nz, .e_s, .m_s, .idx_s);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    logic [NT-1:0] seen;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NT; i++) begin
        e[i]  = EW'($signed($urandom % 7) - 3 + ((t % 3 == 0) ? $signed($urandom % 400) - 200 : 0));
        nz[i] = ($urandom % 4) != 0;
        m[i]  = nz[i] ? (W+1)'({$urandom, $urandom}) | 1 : '0;
      end
      #1;
      ok = 1;
      seen = '0;
      for (int r = 0; r < NT; r++) begin
        if (int'(idx_s[r]) >= NT) ok = 0;
        else begin
          if (seen[idx_s[r]]) ok = 0;
          seen[idx_s[r]] = 1;
          if (e_s[r] != e[idx_s[r]] || m_s[r] != m[idx_s[r]]) ok = 0;
        end
        if (r > 0) begin
          // keys non-increasing; equal keys keep input order
          if (e_s[r] > e_s[r-1]) ok = 0;
          if (e_s[r] == e_s[r-1] && nz[idx_s[r]] && !nz[idx_s[r-1]]) ok = 0;
          if (e_s[r] == e_s[r-1] && nz[idx_s[r]] == nz[idx_s[r-1]] && idx_s[r] < idx_s[r-1]) ok = 0;
        end
      end
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("MISMATCH t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
