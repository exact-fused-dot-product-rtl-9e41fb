// fdpna: exact fused dot product add operator,
//   R = round(X_0*Y_0 + ... + X_{N-1}*Y_{N-1} + Z),
// with one rounding of the exact sum, subnormals supported on all inputs.
//
// N fdp_product units and one fdp_addend unit bring the N products and the
// addend into a common (exponent, signed significand) form, and fp_sigma adds
// them exactly in a compressed accumulator and rounds. The default
// configuration is FP32 (8-bit exponent, 23-bit fraction) with N = 4; the
// input format (EIN, MIN) may differ from the output format (EOUT, MOUT) for
// mixed precision, e.g. BF16 products with an FP32 addend and result (there W
// may be raised to 32 so that subnormal BF16 products stay exact).
//
// Interface and timing (design choice): the datapath is one combinational
// block between an input capture and an output register. Operands are taken
// when in_valid is high; r, flags and out_valid appear on the next rising edge
// (latency 1, one operation per cycle). rst_n is an active-low synchronous
// reset of out_valid.
module fdpna
  import fdp_pkg::*;
#(
  parameter int N    = 4,
  parameter int EIN  = 8,
  parameter int MIN  = 23,
  parameter int EOUT = 8,
  parameter int MOUT = 23,
  parameter int W    = fdp_w(MIN, MOUT),
  localparam int EW  = fdp_ew(EIN, EOUT),
  localparam int NT  = N + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [N-1:0][EIN+MIN:0]    x,
  input  logic [N-1:0][EIN+MIN:0]    y,
  input  logic [EOUT+MOUT:0]         z,
  input  fdp_rm_e                    rm,
  output logic                       out_valid,
  output logic [EOUT+MOUT:0]         r,
  output fdp_flags_t                 flags
);
  logic signed [EW-1:0] e   [NT];
  logic signed [W:0]    m   [NT];
  logic                 nz  [NT];
  fdp_cls_t             cls [NT];
  logic [EOUT+MOUT:0]   r_c;
  fdp_flags_t           flags_c;

  for (genvar i = 0; i < N; i++) begin : g_prod
    fdp_product #(.EIN(EIN), .MIN(MIN), .W(W), .EW(EW)) u_prod (
      .x(x[i]), .y(y[i]), .e(e[i]), .m(m[i]), .nz(nz[i]), .cls(cls[i])
    );
  end

  fdp_addend #(.EOUT(EOUT), .MOUT(MOUT), .W(W), .EW(EW)) u_addend (
    .z(z), .e(e[N]), .m(m[N]), .nz(nz[N]), .cls(cls[N])
  );

  fp_sigma #(.N(N), .EOUT(EOUT), .MOUT(MOUT), .W(W), .EW(EW)) u_sigma (
    .e(e), .m(m), .nz(nz), .cls(cls), .rm(rm), .r(r_c), .flags(flags_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      r         <= '0;
      flags     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        r     <= r_c;
        flags <= flags_c;
      end
    end
  end
endmodule
