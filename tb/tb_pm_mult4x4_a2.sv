// Self-checking test of pm_mult4x4_a2, the 4x4 multiplier of
// architecture 2 (4-bit ripple carry adders).
// All 256 operand pairs are applied, including the example operands
// 1111 x 1001 and 1010 x 1111; each product is compared with the integer
// product a * b. Combinational: 1 ns settle time per vector.
module tb_pm_mult4x4_a2;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;

  pm_mult4x4_a2 dut (.a(a), .b(b), .p(p));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (p !== 8'(a) * 8'(b)) begin
        failures++;
        $display("FAIL %0d*%0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
