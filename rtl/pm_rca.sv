// Ripple carry adder of W bits: {co, s} = a + b + ci.
// A chain of W full adders, the carry rippling from bit 0 upwards, so the
// delay grows linearly with W. The multipliers use 4-bit instances (the
// adders of architecture 2) and 8-bit instances (the adders of architecture
// 1). The full-adder chain is the textbook ripple structure; the width is a
// parameter so the same module serves every level of the recursive
// multiplier. Combinational, no clock.
module pm_rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;

  assign c[0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_bit
    pm_full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end
  assign co = c[W];
endmodule
