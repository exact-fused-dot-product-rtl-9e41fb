// tb_fdp_shift_compute: checks the parallel-prefix shift computation for
// N = 4, w = 48 against the sequential definition of the shifts: each term
// either joins the zone of the previous term (when that gives a smaller shift)
// or takes its own zone. Zone boundaries for this size are written out by
// hand: d = 0, 52, 103, 154, 204 and p = 3, 2, 2, 1, 0.
module tb_fdp_shift_compute;
  localparam int N = 4, NT = 5, W = 48, EW = 11;
  localparam int D [NT] = '{0, 52, 103, 154, 204};
  localparam int P [NT] = '{3, 2, 2, 1, 0};

  logic signed [EW-1:0] e_s [NT];
  logic [7:0] s [NT];
  logic [2:0] k [NT];

  fdp_shift_compute #(.N(N), .W(W), .EW(EW)) dut (.e_s, .s, .k);

  int checks = 0, failures = 0;
  int n_merge = 0, n_own = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev [NT];
    int es, ek, cand, own;
    logic ok;
    for (int t = 0; t < 5000; t++) begin
      ev[0] = int'($urandom % 500) - 250;
      for (int i = 1; i < NT; i++)
        ev[i] = ev[i-1] - int'(($urandom % 2) ? $urandom % 8 : $urandom % 120);
      for (int i = 0; i < NT; i++) e_s[i] = EW'(ev[i]);
      #1;
      ok = 1;
      es = D[0] + P[0];
      ek = 0;
      if (int'(s[0]) != es || k[0] != 0) ok = 0;
      for (int i = 1; i < NT; i++) begin
        cand = D[ek] + P[ek] + ev[ek] - ev[i];
        own  = D[i] + P[i];
        if (cand < own) begin es = cand; n_merge++; end
        else begin es = own; ek = i; n_own++; end
        if (int'(s[i]) != es || int'(k[i]) != ek) ok = 0;
      end
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("MISMATCH e=%p s=%p k=%p", ev, s, k);
      end
    end
    checks++;
    if (n_merge == 0 || n_own == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
