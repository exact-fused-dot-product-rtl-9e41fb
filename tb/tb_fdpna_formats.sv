// tb_fdpna_formats: runs the FDPNA operator in every configuration of the
// evaluation grid: FP16, BF16 products with FP32 addend/result (w = 32 for
// subnormal BF16 support), FP32 and FP64, each with N = 2, 4, 8 and 16
// products. Each configuration gets its own instance and its own stimulus
// process (random operands plus a same-exponent cancellation pattern, all
// rounding modes) and is checked against the exact reference model, with the
// 1-cycle latency checked on every operation.
module tb_fdpna_formats;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int NCFG = 16;
  localparam int NTEST = 600;
  localparam int CN   [NCFG] = '{2, 4, 8, 16, 2, 4, 8, 16, 2, 4, 8, 16, 2, 4, 8, 16};
  localparam int CEI  [NCFG] = '{5, 5, 5, 5, 8, 8, 8, 8, 8, 8, 8, 8, 11, 11, 11, 11};
  localparam int CMI  [NCFG] = '{10, 10, 10, 10, 7, 7, 7, 7, 23, 23, 23, 23, 52, 52, 52, 52};
  localparam int CEO  [NCFG] = '{5, 5, 5, 5, 8, 8, 8, 8, 8, 8, 8, 8, 11, 11, 11, 11};
  localparam int CMO  [NCFG] = '{10, 10, 10, 10, 23, 23, 23, 23, 23, 23, 23, 23, 52, 52, 52, 52};
  localparam int CW   [NCFG] = '{22, 22, 22, 22, 32, 32, 32, 32, 48, 48, 48, 48, 106, 106, 106, 106};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;

  initial begin : watchdog
    #(10 * (NTEST + 100) * 10);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N = CN[c], EI = CEI[c], MI = CMI[c], EO = CEO[c], MO = CMO[c];
    logic in_valid = 0, out_valid;
    logic [N-1:0][EI+MI:0] x;
    logic [N-1:0][EI+MI:0] y;
    logic [EO+MO:0] z, r;
    fdp_rm_e rm;
    fdp_flags_t flags;

    fdpna #(.N(N), .EIN(EI), .MIN(MI), .EOUT(EO), .MOUT(MO), .W(CW[c])) dut (
      .clk, .rst_n, .in_valid, .x, .y, .z, .rm, .out_valid, .r, .flags);

    initial begin
      fp_vec_t xv, yv;
      fp_t zv, want;
      logic [3:0] wf;
      int rmi, eb, k;
      x = '0; y = '0; z = '0; rm = RM_RNE;
      @(posedge rst_n);
      @(posedge clk);
      for (int t = 0; t < NTEST; t++) begin
        for (int i = 0; i < 16; i++) begin xv[i] = '0; yv[i] = '0; end
        if (t % 3 == 0) begin
          // same exponent after product for every term: deep cancellation
          eb = bias(EI) + int'($urandom % 8);
          for (int i = 0; i < N; i++) begin
            k = int'($urandom % 6);
            xv[i] = mk(EI, MI, 1'($urandom), eb - k, {$urandom, $urandom});
            yv[i] = mk(EI, MI, 1'($urandom), bias(EI) + k, {$urandom, $urandom});
          end
          zv = mk(EO, MO, 1'($urandom), eb - bias(EI) + bias(EO), {$urandom, $urandom});
        end else begin
          for (int i = 0; i < N; i++) begin
            xv[i] = rnd_fp(EI, MI, rnd_kind());
            yv[i] = rnd_fp(EI, MI, rnd_kind());
          end
          zv = rnd_fp(EO, MO, rnd_kind());
        end
        rmi = int'($urandom % 5);
        for (int i = 0; i < N; i++) begin
          x[i] <= xv[i][EI+MI:0];
          y[i] <= yv[i][EI+MI:0];
        end
        z <= zv[EO+MO:0];
        rm <= fdp_rm_e'(rmi);
        in_valid <= 1;
        fdp_ref(N, EI, MI, EO, MO, xv, yv, zv, rmi, want, wf);
        @(posedge clk);   // operands captured, result registered on this edge
        in_valid <= 0;
        #1;
        checks++;
        if (!out_valid || r !== want[EO+MO:0] || flags !== wf) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH cfg=%0d t=%0d got %h %b want %h %b", c, t, r, flags, want[EO+MO:0], wf);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
