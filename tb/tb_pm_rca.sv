// Self-checking test of pm_rca, the ripple carry adder.
// The 4-bit instance (the width used by architecture 2) is checked over all
// 512 combinations of a, b and carry-in; an 8-bit instance (the width of
// architecture 1's adders) over 2000 random ones. The expected value is the
// integer sum a + b + ci. No clock: each vector is applied and checked after
// a 1 ns settle time. A watchdog ends the run if it ever hangs.
module tb_pm_rca;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [7:0] a8, b8, s8;
  logic       ci8, co8;

  pm_rca #(.W(4)) dut4 (.a(a4), .b(b4), .ci(ci4), .s(s4), .co(co4));
  pm_rca #(.W(8)) dut8 (.a(a8), .b(b8), .ci(ci8), .s(s8), .co(co8));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL W=4 a=%0d b=%0d ci=%0d -> %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a8  = 8'($urandom);
      b8  = 8'($urandom);
      ci8 = 1'($urandom);
      #1;
      checks++;
      if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(ci8)) begin
        failures++;
        $display("FAIL W=8 a=%0d b=%0d ci=%0d -> %0d", a8, b8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
