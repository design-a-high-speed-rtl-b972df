// End-to-end test of cmul_top at its default parameters (N = 8,
// architecture 2). Both complex multiplication solutions see the same
// operands; each result is compared with integer complex multiplication and
// the two solutions are compared with each other.
// Vectors: the reference product 2 * 3 = 6, every combination of the
// corner values -128, -127, -1, 0, 1, 127 for the four parts (1296 sets), then 100000 random sets.
// Mechanisms counted, each must occur at least once:
//   neg_product - a real product whose operands have opposite signs, so the
//                 signed wrapper negates the unsigned core's result
//   ext_bit     - both sums ar+ai and br+bi equal -2^N, so the extended
//                 (N+1)-bit multiplication of the three-multiplier solution
//                 uses its extra magnitude bit
//   wide_im     - an imaginary part outside the 2N-bit signed range, which
//                 needs the extra output bit
//   min_operand - a part equal to -2^(N-1), whose magnitude is 2^(N-1)
// Combinational: 1 ns settle time per vector.
module tb_cmul_top;
  localparam int N = 8;
  int checks = 0, failures = 0;
  int neg_product = 0, ext_bit = 0, wide_im = 0, min_operand = 0;

  logic signed [N-1:0] ar, ai, br, bi;
  logic signed [2*N:0] pr4, pi4, pr3, pi3;

  cmul_top dut (
    .ar(ar), .ai(ai), .br(br), .bi(bi),
    .pr4(pr4), .pi4(pi4), .pr3(pr3), .pi3(pi3)
  );

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s (%0d,%0d)*(%0d,%0d) got %0d expected %0d",
                 what, ar, ai, br, bi, got, exp);
    end
  endtask

  task automatic apply_and_check();
    int er, ei;
    #1;
    er = int'(ar) * int'(br) - int'(ai) * int'(bi);
    ei = int'(ar) * int'(bi) + int'(ai) * int'(br);
    check("4-mult re", int'(pr4), er);
    check("4-mult im", int'(pi4), ei);
    check("3-mult re", int'(pr3), er);
    check("3-mult im", int'(pi3), ei);
    check("solutions agree re", int'(pr3), int'(pr4));
    check("solutions agree im", int'(pi3), int'(pi4));
    if ((ar < 0) != (br < 0) && ar != 0 && br != 0) neg_product++;
    if (int'(ar) + int'(ai) == -(1 << N) && int'(br) + int'(bi) == -(1 << N)) ext_bit++;
    if (ei >= (1 << (2*N-1)) || ei < -(1 << (2*N-1))) wide_im++;
    if (ar == -(1 << (N-1)) || bi == -(1 << (N-1))) min_operand++;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [N-1:0] corner [6];
    corner = '{-8'sd128, -8'sd127, -8'sd1, 8'sd0, 8'sd1, 8'sd127};
    // Reference vector: operands 00000010 and 00000011 give the product
    // 00000110 (2 * 3 = 6), taken here as two purely real operands.
    ar = 8'b0000_0010; ai = '0; br = 8'b0000_0011; bi = '0;
    apply_and_check();
    check("reference 2*3, 4-mult", int'(pr4), 6);
    check("reference 2*3, 3-mult", int'(pr3), 6);
    for (int i = 0; i < 1296; i++) begin
      ar = corner[i % 6];
      ai = corner[(i / 6) % 6];
      br = corner[(i / 36) % 6];
      bi = corner[(i / 216) % 6];
      apply_and_check();
    end
    for (int i = 0; i < 100000; i++) begin
      ar = N'($urandom);
      ai = N'($urandom);
      br = N'($urandom);
      bi = N'($urandom);
      apply_and_check();
    end
    $display("mechanisms: neg_product=%0d ext_bit=%0d wide_im=%0d min_operand=%0d",
             neg_product, ext_bit, wide_im, min_operand);
    checks++;
    if (neg_product == 0) begin failures++; $display("FAIL no negated product"); end
    checks++;
    if (ext_bit == 0) begin failures++; $display("FAIL extension bit never used"); end
    checks++;
    if (wide_im == 0) begin failures++; $display("FAIL no wide imaginary result"); end
    checks++;
    if (min_operand == 0) begin failures++; $display("FAIL no -2^(N-1) operand"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
