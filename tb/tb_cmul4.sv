// Self-checking test of cmul4, the complex multiplier (four real multipliers solution).
// Runs N = 8 in both multiplier architectures and N = 4 exhaustively in the
// default one (all 65536 operand sets). For N = 8 the corner operands
// (all parts -2^(N-1), 2^(N-1)-1, 0, mixed) come first, then 50000 random
// sets. Expected values are (ar*br - ai*bi) and (ar*bi + ai*br) in integer
// arithmetic. Combinational: 1 ns settle time per vector.
module tb_cmul4;
  import pm_pkg::*;
  int checks = 0, failures = 0;

  logic signed [7:0]  ar, ai, br, bi;
  logic signed [16:0] pr_a1, pi_a1, pr_a2, pi_a2;
  logic signed [3:0]  sr, si, tr, ti;
  logic signed [8:0]  qr, qi;

  cmul4 #(.N(8), .ARCH(ARCH_WIDE)) dut_a1 (.ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr_a1), .pi(pi_a1));
  cmul4 #(.N(8), .ARCH(ARCH_RCA))  dut_a2 (.ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr_a2), .pi(pi_a2));
  cmul4 #(.N(4))                   dut_n4 (.ar(sr), .ai(si), .br(tr), .bi(ti), .pr(qr), .pi(qi));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
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
    logic signed [7:0] corner [4] = '{-8'sd128, 8'sd127, 8'sd0, -8'sd1};
    for (int i = 0; i < 256; i++) begin
      ar = corner[i & 3];
      ai = corner[(i >> 2) & 3];
      br = corner[(i >> 4) & 3];
      bi = corner[(i >> 6) & 3];
      #1;
      check("N=8 arch1 re", int'(pr_a1), int'(ar) * int'(br) - int'(ai) * int'(bi));
      check("N=8 arch1 im", int'(pi_a1), int'(ar) * int'(bi) + int'(ai) * int'(br));
      check("N=8 arch2 re", int'(pr_a2), int'(ar) * int'(br) - int'(ai) * int'(bi));
      check("N=8 arch2 im", int'(pi_a2), int'(ar) * int'(bi) + int'(ai) * int'(br));
    end
    for (int i = 0; i < 50000; i++) begin
      ar = 8'($urandom);
      ai = 8'($urandom);
      br = 8'($urandom);
      bi = 8'($urandom);
      #1;
      check("N=8 arch1 re", int'(pr_a1), int'(ar) * int'(br) - int'(ai) * int'(bi));
      check("N=8 arch1 im", int'(pi_a1), int'(ar) * int'(bi) + int'(ai) * int'(br));
      check("N=8 arch2 re", int'(pr_a2), int'(ar) * int'(br) - int'(ai) * int'(bi));
      check("N=8 arch2 im", int'(pi_a2), int'(ar) * int'(bi) + int'(ai) * int'(br));
    end
    for (int i = 0; i < 65536; i++) begin
      {sr, si, tr, ti} = 16'(i);
      #1;
      check("N=4 re", int'(qr), int'(sr) * int'(tr) - int'(si) * int'(ti));
      check("N=4 im", int'(qi), int'(sr) * int'(ti) + int'(si) * int'(tr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
