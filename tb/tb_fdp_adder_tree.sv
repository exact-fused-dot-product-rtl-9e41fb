// tb_fdp_adder_tree: checks the multi-operand adder for 5 operands of 254
// bits (the default FP32, N = 4 accumulator) and for 3 operands, against a
// running sum, with random values and values near the range limits.
module tb_fdp_adder_tree;
  localparam int WA = 254;

  logic signed [WA-1:0] a5 [5], a3 [3], s5, s3;

  fdp_adder_tree #(.NT(5), .WA(WA)) dut5 (.t(a5), .sum(s5));
  fdp_adder_tree #(.NT(3), .WA(WA)) dut3 (.t(a3), .sum(s3));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [WA-1:0] rnd();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return $signed(WA'(v)) >>> ($urandom % 8);
  endfunction

  initial begin
    logic signed [WA-1:0] w5, w3;
    for (int t = 0; t < 3000; t++) begin
      w5 = '0; w3 = '0;
      for (int i = 0; i < 5; i++) begin a5[i] = rnd(); w5 = w5 + a5[i]; end
      for (int i = 0; i < 3; i++) begin a3[i] = rnd(); w3 = w3 + a3[i]; end
      #1;
      checks += 2;
      if (s5 != w5) failures++;
      if (s3 != w3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
