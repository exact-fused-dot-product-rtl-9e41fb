// tb_fdp_round: checks the rounding stage for an FP32 result from a 253-bit
// normalised significand. The exact value (-1)^s * mag_n * 2^(e_res - 252)
// is rounded by the reference model under all five modes; exponents cover
// normal, subnormal, underflow-to-zero and overflow results. Special-value
// inputs and exact zeros are checked separately.
module tb_fdp_round;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int EOUT = 8, MOUT = 23, WC = 253, XW = 21;

  logic sign, zero, sp_nan, sp_invalid, sp_inf, sp_sign, zero_sign;
  logic [WC-1:0] mag_n;
  logic signed [XW-1:0] e_res;
  fdp_rm_e rm;
  logic [31:0] r;
  fdp_flags_t flags;

  fdp_round #(.EOUT(EOUT), .MOUT(MOUT), .WC(WC), .XW(XW)) dut (
    .sign, .zero, .mag_n, .e_res, .rm, .sp_nan, .sp_invalid, .sp_inf, .sp_sign,
    .zero_sign, .r, .flags);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] v;
    fp_t want;
    logic [3:0] wf;
    int ev, sel;
    for (int t = 0; t < 8000; t++) begin
      for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
      sel = int'($urandom % 4);
      // short significands make exact and tie cases likely
      if (sel == 0) v = v & ~((256'(1) << (WC - 26)) - 1);
      if (sel == 1) v = v & ~((256'(1) << (WC - 25 - int'($urandom % 3))) - 1);
      mag_n = WC'(v) | (WC'(1) << (WC - 1));
      ev = ($urandom % 4 == 0) ? int'($urandom % 400) - 200 : int'($urandom % 60) - 160 + (($urandom % 2) ? 250 : 0);
      e_res = XW'(ev);
      sign = 1'($urandom);
      rm = fdp_rm_e'($urandom % 5);
      zero = 0; sp_nan = 0; sp_invalid = 0; sp_inf = 0; sp_sign = 0; zero_sign = 0;
      #1;
      ref_round(sign, REFW'(mag_n), ev - (WC - 1), EOUT, MOUT, int'(rm), want, wf);
      checks++;
      if (r != want[31:0] || flags != wf) begin
        failures++;
        if (failures < 10) $display("MISMATCH e=%0d rm=%0d got %h %b want %h %b", ev, rm, r, flags, want[31:0], wf);
      end
    end
    // special values and zeros
    zero = 1; #1; checks++;
    if (r != 32'h0000_0000 || flags != 0) failures++;
    zero_sign = 1; #1; checks++;
    if (r != 32'h8000_0000 || flags != 0) failures++;
    sp_inf = 1; sp_sign = 0; #1; checks++;
    if (r != 32'h7f80_0000 || flags != 0) failures++;
    sp_sign = 1; #1; checks++;
    if (r != 32'hff80_0000 || flags != 0) failures++;
    sp_nan = 1; sp_invalid = 1; #1; checks++;
    if (r != 32'h7fc0_0000 || !flags.invalid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
