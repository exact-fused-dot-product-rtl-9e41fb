// tb_fdp_rshift: checks one significand shifter (w = 48, w_compressed = 253,
// shift range 0..154). No bit can be lost at these sizes, so the output
// shifted back left by S must equal the input significand scaled to the left
// end of the accumulator, sign included.
module tb_fdp_rshift;
  localparam int W = 48, WC = 253, MS = 154, SHW = 8;

  logic signed [W:0] m;
  logic [SHW-1:0] s;
  logic signed [WC:0] t;

  fdp_rshift #(.W(W), .WC(WC), .MAX_SHIFT(MS), .SHW(SHW)) dut (.m, .s, .t);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [511:0] want, got;
    for (int t0 = 0; t0 < 5000; t0++) begin
      m = (W+1)'({$urandom, $urandom});
      s = SHW'($urandom % (MS + 1));
      #1;
      want = 512'(m) * (512'(1) <<< (WC - W));
      got  = 512'(t) * (512'(1) <<< s);
      checks++;
      if (want != got) begin
        failures++;
        if (failures < 10) $display("MISMATCH m=%h s=%0d", m, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
