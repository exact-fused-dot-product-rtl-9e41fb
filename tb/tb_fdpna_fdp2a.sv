// tb_fdpna_fdp2a: directed validation of the two-product operator (FDP2A,
// R = X0*Y0 + X1*Y1 + Z) in FP32 and FP64, aimed at the cases where a
// single-rounding operator is easiest to get wrong. Every operation is
// checked bit for bit (result and flags, all five rounding modes) against
// the exact reference model, with the 1-cycle latency checked too.
//
// Stimulus classes, drawn in turn for each format:
//   0  catastrophic cancellation between the two products, built from
//      different significands with the same product: with integers
//      a1,a2,b1,b2 of about half the significand width, X0*Y0 = (a1 a2)(b1 b2)
//      and X1*Y1 = -(a1 b1)(a2 b2), so the products cancel exactly while
//      no significand repeats; Z is zero, tiny or close to the products.
//   1  cancellation between Z and a product: X0, Y0 have short significands
//      so their product is representable, Z = -X0*Y0 or one unit in the last
//      place away, and X1*Y1 is a small term far below.
//   2  several sticky contributions: X0*Y0 is a representable value, Z puts
//      the sum exactly on a rounding tie (half an ulp) and X1*Y1 is a tiny
//      term of either sign 1..60 places further down, or exactly -Z.
//   3  subnormal operands, subnormal products and subnormal results.
//   4  random operands of every class, NaN and infinity included.
// The count of each class and of exact-zero and inexact results is
// printed; a class or outcome that never happened counts as a failure.
module tb_fdpna_fdp2a;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int NCFG  = 2;
  localparam int NTEST = 250000;
  localparam int CEI [NCFG] = '{8, 11};
  localparam int CMI [NCFG] = '{23, 52};
  localparam int CW  [NCFG] = '{48, 106};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int done = 0;
  int n_class [NCFG][5];
  int n_zero  [NCFG];
  int n_inex  [NCFG];

  initial begin : watchdog
    #((NTEST + 100) * 10 * 2);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCFG; c++) begin
      n_zero[c] = 0;
      n_inex[c] = 0;
      for (int k = 0; k < 5; k++) n_class[c][k] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  // A * 2^e2 as a normal number of format (e, m); A must be non-zero and
  // fit in m+1 bits, and the result exponent must be in the normal range.
  function automatic fp_t fp_int(input int e, input int m, input logic s,
                                 input longint unsigned a, input int e2);
    int top;
    top = 0;
    for (int b = 0; b < 64; b++) if (a[b]) top = b;
    a = a << (m - top);
    return mk(e, m, s, longint'(bias(e) + e2 + top), a);
  endfunction

  // random integer in [2^(h-1), 2^h)
  function automatic longint unsigned rnd_h(input int h);
    longint unsigned v;
    v = {32'($urandom), 32'($urandom)};
    return (v & ((64'd1 << (h - 1)) - 1)) | (64'd1 << (h - 1));
  endfunction

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int EI = CEI[c], MI = CMI[c];
    logic in_valid = 0, out_valid;
    logic [1:0][EI+MI:0] x;
    logic [1:0][EI+MI:0] y;
    logic [EI+MI:0] z, r;
    fdp_rm_e rm;
    fdp_flags_t flags;

    fdpna #(.N(2), .EIN(EI), .MIN(MI), .EOUT(EI), .MOUT(MI), .W(CW[c])) dut (
      .clk, .rst_n, .in_valid, .x, .y, .z, .rm, .out_valid, .r, .flags);

    initial begin
      fp_vec_t xv, yv;
      fp_t zv, want;
      logic [3:0] wf;
      longint unsigned a1, a2, b1, b2, p;
      int rmi, cls, h, s1, s2, s3, k;
      logic sg;
      h = (MI + 1) / 2;
      x = '0; y = '0; z = '0; rm = RM_RNE;
      @(posedge rst_n);
      @(posedge clk);
      for (int t = 0; t < NTEST; t++) begin
        for (int i = 0; i < 16; i++) begin xv[i] = '0; yv[i] = '0; end
        cls = t % 5;
        sg = 1'($urandom);
        case (cls)
          0: begin
            a1 = rnd_h(h); a2 = rnd_h(h); b1 = rnd_h(h); b2 = rnd_h(h);
            s1 = int'($urandom % 40) - 20;
            s2 = int'($urandom % 40) - 20;
            s3 = int'($urandom % 40) - 20;
            xv[0] = fp_int(EI, MI, sg, a1 * a2, s1);
            yv[0] = fp_int(EI, MI, 1'($urandom), b1 * b2, s2);
            xv[1] = fp_int(EI, MI, 1'($urandom), a1 * b1, s3);
            yv[1] = fp_int(EI, MI, ~(xv[0][EI+MI] ^ yv[0][EI+MI] ^ xv[1][EI+MI]),
                           a2 * b2, s1 + s2 - s3);
            case ($urandom % 3)
              0: zv = mk(EI, MI, 1'($urandom), 0, 0);
              1: zv = fp_int(EI, MI, 1'($urandom), rnd_h(MI + 1),
                             s1 + s2 - 2 * MI - int'($urandom % 60));
              default: zv = fp_int(EI, MI, 1'($urandom), rnd_h(MI + 1),
                                   s1 + s2 - int'($urandom % 4));
            endcase
          end
          1: begin
            a1 = rnd_h(h); b1 = rnd_h(h);
            s1 = int'($urandom % 40) - 20;
            s2 = int'($urandom % 40) - 20;
            xv[0] = fp_int(EI, MI, sg, a1, s1);
            yv[0] = fp_int(EI, MI, 1'($urandom), b1, s2);
            p = a1 * b1;
            case ($urandom % 3)
              0: ;
              1: p = p + 1;
              default: p = p - 1;
            endcase
            zv = fp_int(EI, MI, ~(xv[0][EI+MI] ^ yv[0][EI+MI]), p, s1 + s2);
            k = int'($urandom % 80);
            xv[1] = fp_int(EI, MI, 1'($urandom), rnd_h(MI + 1), s1 - MI - k / 2);
            yv[1] = fp_int(EI, MI, 1'($urandom), rnd_h(MI + 1), s2 - MI - (k - k / 2));
          end
          2: begin
            // X0*Y0 = A*2^s1 with A of MI+1 bits; its ulp is 2^s1
            p = rnd_h(MI + 1);
            s1 = int'($urandom % 40) - 20;
            xv[0] = fp_int(EI, MI, sg, p, s1);
            yv[0] = fp_int(EI, MI, 0, 1, 0);
            // Z = +-1/2 ulp of the product: the sum X0*Y0 + Z is a tie
            zv = fp_int(EI, MI, 1'($urandom), 1, s1 - 1);
            k = 1 + int'($urandom % 60);
            if ($urandom % 4 == 0) begin
              // X1*Y1 = -Z exactly: the tie is undone, the sum is exact
              xv[1] = fp_int(EI, MI, ~zv[EI+MI], 1, s1 - 1);
              yv[1] = fp_int(EI, MI, 0, 1, 0);
            end else begin
              xv[1] = fp_int(EI, MI, 1'($urandom), rnd_h(MI + 1), s1 - 1 - k - MI);
              yv[1] = fp_int(EI, MI, 1'($urandom), 1, -MI);
            end
          end
          3: begin
            for (int i = 0; i < 2; i++) begin
              xv[i] = rnd_fp(EI, MI, ($urandom % 2) ? 2 : 1);
              yv[i] = rnd_fp(EI, MI, ($urandom % 2) ? 2 : 1);
            end
            zv = rnd_fp(EI, MI, ($urandom % 3 == 0) ? 1 : 2);
          end
          default: begin
            for (int i = 0; i < 2; i++) begin
              xv[i] = rnd_fp(EI, MI, rnd_kind());
              yv[i] = rnd_fp(EI, MI, rnd_kind());
            end
            zv = rnd_fp(EI, MI, rnd_kind());
          end
        endcase
        n_class[c][cls]++;
        rmi = int'($urandom % 5);
        for (int i = 0; i < 2; i++) begin
          x[i] <= xv[i][EI+MI:0];
          y[i] <= yv[i][EI+MI:0];
        end
        z <= zv[EI+MI:0];
        rm <= fdp_rm_e'(rmi);
        in_valid <= 1;
        fdp_ref(2, EI, MI, EI, MI, xv, yv, zv, rmi, want, wf);
        @(posedge clk);   // operands captured, result registered on this edge
        in_valid <= 0;
        #1;
        checks++;
        if (want[EI+MI-1:0] == '0) n_zero[c]++;
        if (wf[0]) n_inex[c]++;
        if (!out_valid || r !== want[EI+MI:0] || flags !== wf) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH cfg=%0d t=%0d cls=%0d got %h %b want %h %b",
                     c, t, cls, r, flags, want[EI+MI:0], wf);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NCFG);
    for (int c = 0; c < NCFG; c++) begin
      $display("cfg %0d: classes %0d %0d %0d %0d %0d, exact zero %0d, inexact %0d",
               c, n_class[c][0], n_class[c][1], n_class[c][2], n_class[c][3],
               n_class[c][4], n_zero[c], n_inex[c]);
      for (int k = 0; k < 5; k++) if (n_class[c][k] == 0) failures++;
      if (n_zero[c] == 0 || n_inex[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
