// tb_fp_sigma: checks the compressed FP-Sigma (N = 4, FP32 result, w = 48)
// on terms given directly as (exponent, signed significand): four product
// terms, each the exact product of two random 24-bit significands (implicit
// bit sometimes 0, as for subnormals), and one addend term. Exponents are
// drawn to create overlapping, merged and separate zones and cancellations.
// The expected result is the reference rounding of the exact sum of the terms
// formed in a wide fixed-point integer.
module tb_fp_sigma;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int N = 4, NT = 5, EOUT = 8, MOUT = 23, W = 48, EW = 11;
  localparam int LSBW = -400;   // weight of the reference integer's LSB

  logic signed [EW-1:0] e [NT];
  logic signed [W:0] m [NT];
  logic nz [NT];
  fdp_cls_t cls [NT];
  fdp_rm_e rm;
  logic [31:0] r;
  fdp_flags_t flags;

  fp_sigma #(.N(N), .EOUT(EOUT), .MOUT(MOUT), .W(W), .EW(EW)) dut (
    .e, .m, .nz, .cls, .rm, .r, .flags);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [REFW-1:0] acc;
    logic [47:0] a, b;
    logic [47:0] mag;
    logic s;
    int base, ev;
    fp_t want;
    logic [3:0] wf;
    for (int t = 0; t < 5000; t++) begin
      acc = '0;
      base = int'($urandom % 300) - 200;
      for (int i = 0; i < NT; i++) begin
        a = 48'({1'($urandom % 8 != 0), 23'($urandom)});
        b = (i < N) ? 48'({1'($urandom % 8 != 0), 23'($urandom)}) : 48'(1 << 23);
        mag = a * b;
        if (i == N) mag = mag << 1;     // addend: leading bit at weight 2^0
        if ($urandom % 10 == 0) mag = '0;
        s = 1'($urandom);
        ev = base - (($urandom % 2) ? int'($urandom % 4) : int'($urandom % 120));
        e[i] = EW'(ev);
        m[i] = s ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
        nz[i] = (mag != 0);
        cls[i] = '{nan: 0, snan: 0, inf: 0, inv: 0, sign: s};
        // value = m * 2^(ev - 46)
        if (s) acc = acc - (REFW'(mag) << (ev - 46 - LSBW));
        else   acc = acc + (REFW'(mag) << (ev - 46 - LSBW));
      end
      rm = fdp_rm_e'($urandom % 5);
      #1;
      checks++;
      if (acc == 0) begin
        if (r[30:0] != 0) failures++;
      end else begin
        ref_round(acc[REFW-1], acc[REFW-1] ? -acc : acc, LSBW, EOUT, MOUT, int'(rm), want, wf);
        if (r != want[31:0] || flags != wf) begin
          failures++;
          if (failures < 10) $display("MISMATCH t=%0d got %h %b want %h %b", t, r, flags, want[31:0], wf);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
