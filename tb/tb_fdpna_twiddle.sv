// tb_fdpna_twiddle: FFT twiddle factors computed on line with the operator
// used as a complex multiply-add (two products per component).
//
// For a P-point transform, w_k = exp(j k theta) with theta = -2 pi / P is
// obtained by the recurrence
//   w_{k+1} = w_k + w_k * (exp(j theta) - 1),
//   exp(j theta) - 1 = a + j b,  a = -2 sin^2(theta/2),  b = sin(theta),
// which avoids the cancellation in cos(theta) - 1. Each step is two FP32
// operations of the default operator (products 2 and 3 set to zero):
//   re' = round(re*a - im*b + re),   im' = round(re*b + im*a + im).
// Every result is checked bit for bit against the exact reference, and the
// largest distance |w_k - exp(j k theta)| over the sequence, against cos and
// sin in double precision, is reported and must stay below 1e-5 (a bound
// chosen for this test) for P = 64 .. 65536.
module tb_fdpna_twiddle;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int N = 4;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [N-1:0][31:0] x, y;
  logic [31:0] z, r;
  fdp_rm_e rm = RM_RNE;
  fdp_flags_t flags;

  fdpna dut (.clk, .rst_n, .in_valid, .x, .y, .z, .rm, .out_valid, .r, .flags);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // double to FP32, round to nearest even (normal range only)
  function automatic logic [31:0] to_fp32(input real v);
    logic [63:0] d;
    logic [23:0] keep;
    logic        rb, st;
    logic [31:0] res;
    if (v == 0.0) return 32'h0;
    d    = $realtobits(v);
    keep = {1'b1, d[51:29]};
    rb   = d[28];
    st   = |d[27:0];
    res  = {d[63], 8'(int'(d[62:52]) - 1023 + 127), keep[22:0]};
    if (rb && (st || keep[0])) res = res + 1;
    return res;
  endfunction

  function automatic real fp32_val(input logic [31:0] v);
    real s;
    if (v[30:0] == 0) return 0.0;
    s = (1.0 + real'(v[22:0]) / 8388608.0) * pow2(int'(v[30:23]) - 127);
    return v[31] ? -s : s;
  endfunction

  task automatic op(input logic [31:0] x0, x1, y0, y1, z0, output logic [31:0] res);
    fp_vec_t xv, yv;
    fp_t want;
    logic [3:0] wf;
    for (int i = 0; i < 16; i++) begin xv[i] = '0; yv[i] = '0; end
    xv[0] = {32'd0, x0}; xv[1] = {32'd0, x1};
    yv[0] = {32'd0, y0}; yv[1] = {32'd0, y1};
    x <= '0; y <= '0;
    x[0] <= x0; x[1] <= x1; y[0] <= y0; y[1] <= y1; z <= z0;
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    #1;
    fdp_ref(N, 8, 23, 8, 23, xv, yv, {32'd0, z0}, 0, want, wf);
    checks++;
    if (!out_valid || r !== want[31:0] || flags !== wf) begin
      failures++;
      if (failures < 10) $display("MISMATCH got %h want %h", r, want[31:0]);
    end
    res = r;
  endtask

  initial begin
    logic [31:0] re, im, nre, nim, a, b, nb;
    real theta, err, maxerr;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int lp = 6; lp <= 16; lp += 2) begin
      theta = -2.0 * PI / real'(1 << lp);
      a  = to_fp32(-2.0 * $sin(theta / 2.0) * $sin(theta / 2.0));
      b  = to_fp32($sin(theta));
      nb = b ^ 32'h8000_0000;
      re = 32'h3f80_0000;   // 1.0
      im = 32'h0;
      maxerr = 0.0;
      for (int k = 1; k < (1 << lp); k++) begin
        op(re, im, a, nb, re, nre);
        op(re, im, b, a, im, nim);
        re = nre;
        im = nim;
        err = $sqrt((fp32_val(re) - $cos(k * theta)) ** 2 + (fp32_val(im) - $sin(k * theta)) ** 2);
        if (err > maxerr) maxerr = err;
      end
      $display("P = 2^%0d: max |w_k - exp(j k theta)| = %e", lp, maxerr);
      checks++;
      if (maxerr > 1.0e-5) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
