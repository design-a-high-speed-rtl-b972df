// Self-checking test of pm_mult2x2, the 2x2 multiplier cell.
// All 16 operand pairs are applied; each product is compared with the
// integer product a * b. Combinational: 1 ns settle time per vector.
module tb_pm_mult2x2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;

  pm_mult2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (p !== 4'(a) * 4'(b)) begin
        failures++;
        $display("FAIL %0d*%0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
