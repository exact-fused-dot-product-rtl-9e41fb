// tb_fdpna: end-to-end test of the FDPNA operator at its default
// configuration (FP32, N = 4).
//
// Drives one operation per cycle and checks every result and flag word, one
// cycle later, against the exact full-size reference model. Stimulus mixes
// random operands with the directed patterns that stress the compressed
// accumulator: all products at the same exponent with random signs (deep
// cancellation), pairs of equal-exponent products of opposite sign, a
// leading product of a subnormal and a large normal, exact cancellation of
// the leading terms, results near the underflow threshold, overflow and
// special values, under all five rounding
// modes. It also counts how often each mechanism of the datapath was used
// (zone merging, separate zones, leading one found below zone 0, subnormal
// and overflowing results, rounding increments, NaN and infinity results)
// and counts a failure for any that never happened.
module tb_fdpna;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int N    = 4;
  localparam int E    = 8;
  localparam int M    = 23;
  localparam int NTEST = 20000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0][E+M:0] x, y;
  logic [E+M:0] z, r;
  fdp_rm_e rm;
  logic out_valid;
  fdp_flags_t flags;

  fdpna dut (.clk, .rst_n, .in_valid, .x, .y, .z, .rm, .out_valid, .r, .flags);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    #(10 * (NTEST + 100) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_merge, n_sep, n_lowzone, n_sub, n_ovf, n_inc, n_nan, n_inf, n_neg, n_zero_cancel;

  fp_vec_t xv, yv;
  fp_t     zv, rexp;
  logic [3:0] fexp;

  task automatic gen(input int mode);
    int k, ez, eb;
    for (int i = 0; i < 16; i++) begin xv[i] = '0; yv[i] = '0; end
    case (mode)
      0: begin  // random mix of kinds
        for (int i = 0; i < N; i++) begin
          xv[i] = rnd_fp(E, M, rnd_kind());
          yv[i] = rnd_fp(E, M, rnd_kind());
        end
        zv = rnd_fp(E, M, rnd_kind());
      end
      1: begin  // same exponent after product for all terms
        eb = 100 + int'($urandom % 50);
        for (int i = 0; i < N; i++) begin
          k = int'($urandom % 20);
          xv[i] = mk(E, M, 1'($urandom), eb - k, {32'd0, $urandom});
          yv[i] = mk(E, M, 1'($urandom), 127 + k, {32'd0, $urandom});
        end
        zv = mk(E, M, 1'($urandom), eb, {32'd0, $urandom});
      end
      2: begin  // pairs of equal product exponents, opposite signs
        for (int i = 0; i < N; i += 2) begin
          eb = 1 + int'($urandom % 253);
          xv[i]   = mk(E, M, 0, eb, {32'd0, $urandom});
          yv[i]   = mk(E, M, 0, 127, {32'd0, $urandom});
          xv[i+1] = mk(E, M, 1, eb, {32'd0, $urandom});
          yv[i+1] = mk(E, M, 0, 127, {32'd0, $urandom});
        end
        zv = rnd_fp(E, M, rnd_kind());
      end
      3: begin  // leading product: subnormal times large normal
        xv[0] = mk(E, M, 1'($urandom), 0, {32'd0, $urandom});
        yv[0] = mk(E, M, 1'($urandom), 200 + ($urandom % 54), {32'd0, $urandom});
        for (int i = 1; i < N; i++) begin
          xv[i] = mk(E, M, 1'($urandom), 1 + ($urandom % 60), {32'd0, $urandom});
          yv[i] = mk(E, M, 1'($urandom), 60 + ($urandom % 70), {32'd0, $urandom});
        end
        zv = mk(E, M, 1'($urandom), $urandom % 40, {32'd0, $urandom});
        if ($urandom % 2) begin  // small leading product: result near the underflow threshold
          yv[0] = mk(E, M, 1'($urandom), 100 + ($urandom % 40), {32'd0, $urandom});
        end
      end
      4: begin  // exact cancellation of the two leading products
        for (int i = 0; i < N; i++) begin
          xv[i] = rnd_fp(E, M, 1);
          yv[i] = rnd_fp(E, M, (i < 2) ? 6 : 1);
        end
        yv[1] = yv[0];
        xv[1] = xv[0] ^ (64'd1 << (E + M));
        for (int i = 2; i < N; i++) xv[i] = mk(E, M, 1'($urandom), $urandom % 30, {32'd0, $urandom});
        zv = rnd_fp(E, M, ($urandom % 2) ? 2 : 0);
        if ($urandom % 3 == 0) begin  // everything cancels: exact zero
          yv[3] = yv[2];
          xv[3] = xv[2] ^ (64'd1 << (E + M));
          zv = rnd_fp(E, M, 3);
        end
      end
      6: begin  // every term near the underflow threshold: subnormal results
        for (int i = 0; i < N; i++) begin
          eb = -150 + int'($urandom % 30);   // product exponent
          k  = int'($urandom % 30) - 60;
          xv[i] = mk(E, M, 1'($urandom), 127 + k, {32'd0, $urandom});
          yv[i] = mk(E, M, 1'($urandom), 127 + eb - k, {32'd0, $urandom});
        end
        zv = mk(E, M, 1'($urandom), $urandom % 4, {32'd0, $urandom});
      end
      default: begin  // large products: overflow
        for (int i = 0; i < N; i++) begin
          xv[i] = rnd_fp(E, M, 6);
          yv[i] = mk(E, M, 0, 128 + ($urandom % 5), {32'd0, $urandom});
          xv[i][E+M] = 0;
        end
        zv = rnd_fp(E, M, 6);
      end
    endcase
  endtask

  fp_t q_r [$];
  logic [3:0] q_f [$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      fp_t er;
      logic [3:0] ef;
      er = q_r.pop_front();
      ef = q_f.pop_front();
      checks++;
      if ({32'd0, r} !== er || flags !== ef) begin
        failures++;
        if (failures <= 10)
          $display("MISMATCH got r=%h flags=%b exp r=%h flags=%b", r, flags, er[31:0], ef);
      end
    end
  end

  int issued_cyc;
  initial begin
    n_merge = 0; n_sep = 0; n_lowzone = 0; n_sub = 0; n_ovf = 0; n_inc = 0;
    n_nan = 0; n_inf = 0; n_neg = 0; n_zero_cancel = 0;
    x = '0; y = '0; z = '0; rm = RM_RNE;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // latency check: a single operation, out_valid exactly one cycle later
    gen(1);
    for (int i = 0; i < N; i++) begin x[i] <= xv[i][31:0]; y[i] <= yv[i][31:0]; end
    z <= zv[31:0]; rm <= RM_RNE; in_valid <= 1;
    fdp_ref(N, E, M, E, M, xv, yv, zv, 0, rexp, fexp);
    q_r.push_back(rexp); q_f.push_back(fexp);
    @(posedge clk);
    issued_cyc = cyc;
    in_valid <= 0;
    @(posedge clk);
    checks++;
    if (!out_valid) begin failures++; $display("latency: out_valid not high one cycle after issue"); end
    @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("latency: out_valid stuck high"); end

    for (int t = 0; t < NTEST; t++) begin
      int mode, rmi;
      mode = (t % 10 < 4) ? 0 : 1 + (t % 10) % 5;
      if (t % 10 == 9) mode = 5;
      if (t % 10 == 4) mode = 6;
      gen(mode);
      rmi = int'($urandom % 5);
      for (int i = 0; i < N; i++) begin x[i] <= xv[i][31:0]; y[i] <= yv[i][31:0]; end
      z <= zv[31:0]; rm <= fdp_rm_e'(rmi); in_valid <= 1;
      fdp_ref(N, E, M, E, M, xv, yv, zv, rmi, rexp, fexp);
      q_r.push_back(rexp); q_f.push_back(fexp);
      @(posedge clk);
      // mechanisms, observed on the operation just captured
      begin
        logic merged, sep;
        merged = 0; sep = 0;
        for (int i = 1; i <= N; i++) begin
          if (int'(dut.u_sigma.k[i]) != i) merged = 1;
          else if (dut.u_sigma.m_s[i] != 0) sep = 1;
        end
        if (merged) n_merge++;
        if (sep) n_sep++;
        if (!dut.u_sigma.zero && dut.u_sigma.u_fexp.zone != 0) n_lowzone++;
        if (dut.u_sigma.zero && dut.u_sigma.any_nz) n_zero_cancel++;
      end
      if (rexp[30:23] == 0 && rexp[22:0] != 0) n_sub++;
      if (fexp[2]) n_ovf++;
      if (dut.u_sigma.u_round.inc && !dut.u_sigma.u_round.sp_nan && !dut.u_sigma.u_round.sp_inf) n_inc++;
      if (rexp[30:23] == 8'hff && rexp[22:0] != 0) n_nan++;
      if (rexp[30:23] == 8'hff && rexp[22:0] == 0 && !fexp[2]) n_inf++;
      if (rexp[31] && rexp[30:0] != 0) n_neg++;
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);

    $display("mechanisms: zone_merge=%0d separate_zones=%0d result_below_zone0=%0d full_cancellation=%0d subnormal=%0d overflow=%0d round_increment=%0d nan=%0d inf=%0d negative=%0d",
             n_merge, n_sep, n_lowzone, n_zero_cancel, n_sub, n_ovf, n_inc, n_nan, n_inf, n_neg);
    checks += 10;
    if (n_merge == 0) failures++;
    if (n_sep == 0) failures++;
    if (n_lowzone == 0) failures++;
    if (n_zero_cancel == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_inc == 0) failures++;
    if (n_nan == 0) failures++;
    if (n_inf == 0) failures++;
    if (n_neg == 0) failures++;
    if (q_r.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
