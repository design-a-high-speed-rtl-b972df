// Self-checking test of pm_mult, the N x N multiplier built from 2x2 cells.
// Default size (N = 8) in both architectures: all 65536 operand pairs.
// N = 16 in both architectures (two levels of halving above the 4x4
// multipliers): 20000 random pairs plus the all-ones and zero corners.
// N = 2 and N = 4 check the two smallest configurations exhaustively.
// Expected values are integer products. Combinational, 1 ns per vector.
module tb_pm_mult;
  import pm_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8_a1, p8_a2;
  logic [15:0] a16, b16;
  logic [31:0] p16_a1, p16_a2;
  logic [3:0]  a4, b4;
  logic [7:0]  p4_a1, p4_a2;
  logic [1:0]  a2, b2;
  logic [3:0]  p2;

  pm_mult #(.N(8),  .ARCH(ARCH_WIDE)) dut8_a1  (.a(a8),  .b(b8),  .p(p8_a1));
  pm_mult #(.N(8),  .ARCH(ARCH_RCA))  dut8_a2  (.a(a8),  .b(b8),  .p(p8_a2));
  pm_mult #(.N(16), .ARCH(ARCH_WIDE)) dut16_a1 (.a(a16), .b(b16), .p(p16_a1));
  pm_mult #(.N(16), .ARCH(ARCH_RCA))  dut16_a2 (.a(a16), .b(b16), .p(p16_a2));
  pm_mult #(.N(4),  .ARCH(ARCH_WIDE)) dut4_a1  (.a(a4),  .b(b4),  .p(p4_a1));
  pm_mult #(.N(4),  .ARCH(ARCH_RCA))  dut4_a2  (.a(a4),  .b(b4),  .p(p4_a2));
  pm_mult #(.N(2))                    dut2     (.a(a2),  .b(b2),  .p(p2));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i);
      #1;
      check("N=2", 32'(p2), 32'(a2) * 32'(b2));
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      check("N=4 arch1", 32'(p4_a1), 32'(a4) * 32'(b4));
      check("N=4 arch2", 32'(p4_a2), 32'(a4) * 32'(b4));
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      check("N=8 arch1", 32'(p8_a1), 32'(a8) * 32'(b8));
      check("N=8 arch2", 32'(p8_a2), 32'(a8) * 32'(b8));
    end
    for (int i = 0; i < 20004; i++) begin
      case (i)
        0:       begin a16 = 16'hFFFF; b16 = 16'hFFFF; end
        1:       begin a16 = 16'hFFFF; b16 = 16'h0000; end
        2:       begin a16 = 16'h8000; b16 = 16'h8000; end
        3:       begin a16 = 16'h00FF; b16 = 16'hFF00; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); end
      endcase
      #1;
      check("N=16 arch1", p16_a1, 32'(a16) * 32'(b16));
      check("N=16 arch2", p16_a2, 32'(a16) * 32'(b16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
