// tb_fdp_product: checks one product unit (FP32 operands, w = 48).
// The expected value of X*Y is computed in double precision from the decoded
// operands (exact: a 24x24-bit product fits a 53-bit significand) and compared
// with M * 2^(E - (w-2)); the nz bit and the special-value class are checked
// against a direct decoding of the operands.
module tb_fdp_product;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int EIN = 8, MIN = 23, W = 48, EW = 11;

  logic [EIN+MIN:0] x, y;
  logic signed [EW-1:0] e;
  logic signed [W:0] m;
  logic nz;
  fdp_cls_t cls;

  fdp_product #(.EIN(EIN), .MIN(MIN), .W(W), .EW(EW)) dut (.x, .y, .e, .m, .nz, .cls);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fp32_val(input logic [31:0] v);
    real s;
    s = (v[30:23] == 0) ? real'(v[22:0]) / 8388608.0 : 1.0 + real'(v[22:0]) / 8388608.0;
    s = s * pow2((v[30:23] == 0) ? -126 : int'(v[30:23]) - 127);
    return v[31] ? -s : s;
  endfunction

  initial begin
    real want, got;
    fp_t tmp;
    logic special, xz, yz;
    for (int t = 0; t < 5000; t++) begin
      tmp = rnd_fp(EIN, MIN, rnd_kind());
      x = tmp[31:0];
      tmp = rnd_fp(EIN, MIN, rnd_kind());
      y = tmp[31:0];
      #1;
      special = (x[30:23] == 8'hff) || (y[30:23] == 8'hff);
      xz = (x[30:0] == 0);
      yz = (y[30:0] == 0);
      checks++;
      if (!special) begin
        want = fp32_val(x) * fp32_val(y);
        got  = real'(m) * pow2(int'(e) - (W - 2));
        if (got != want || nz != (!xz && !yz) || cls != {4'b0, x[31] ^ y[31]}) begin
          failures++;
          if (failures < 10) $display("MISMATCH x=%h y=%h e=%0d m=%0d want=%g", x, y, e, m, want);
        end
      end else begin
        logic xn, yn, xi, yi;
        xn = x[30:23] == 8'hff && x[22:0] != 0;
        yn = y[30:23] == 8'hff && y[22:0] != 0;
        xi = x[30:23] == 8'hff && x[22:0] == 0;
        yi = y[30:23] == 8'hff && y[22:0] == 0;
        if (cls.nan != (xn || yn) || cls.inf != ((xi || yi) && !(xn || yn)) ||
            cls.inv != ((xi && yz) || (yi && xz)) ||
            cls.snan != ((xn && !x[22]) || (yn && !y[22])) || m != 0) begin
          failures++;
          if (failures < 10) $display("MISMATCH special x=%h y=%h cls=%b", x, y, cls);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
