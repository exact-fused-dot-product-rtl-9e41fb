// tb_fdp_addend: checks the addend unit (FP32 Z, w = 48). The value of Z,
// decoded in double precision, must equal M * 2^(E - (w-2)); nz and the
// special-value class are checked against a direct decoding.
module tb_fdp_addend;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int EOUT = 8, MOUT = 23, W = 48, EW = 11;

  logic [EOUT+MOUT:0] z;
  logic signed [EW-1:0] e;
  logic signed [W:0] m;
  logic nz;
  fdp_cls_t cls;

  fdp_addend #(.EOUT(EOUT), .MOUT(MOUT), .W(W), .EW(EW)) dut (.z, .e, .m, .nz, .cls);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real want, got;
    fp_t tmp;
    for (int t = 0; t < 5000; t++) begin
      tmp = rnd_fp(EOUT, MOUT, rnd_kind());
      z = tmp[31:0];
      #1;
      checks++;
      if (z[30:23] != 8'hff) begin
        want = ((z[30:23] == 0) ? real'(z[22:0]) / 8388608.0 : 1.0 + real'(z[22:0]) / 8388608.0)
               * pow2((z[30:23] == 0) ? -126 : int'(z[30:23]) - 127);
        if (z[31]) want = -want;
        got = real'(m) * pow2(int'(e) - (W - 2));
        if (got != want || nz != (z[30:0] != 0) || cls != {4'b0, z[31]}) begin
          failures++;
          if (failures < 10) $display("MISMATCH z=%h e=%0d m=%0d", z, e, m);
        end
      end else if (cls.nan != (z[22:0] != 0) || cls.inf != (z[22:0] == 0) ||
                   cls.snan != (z[22:0] != 0 && !z[22]) || cls.sign != z[31] || m != 0) begin
        failures++;
        if (failures < 10) $display("MISMATCH special z=%h cls=%b", z, cls);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
