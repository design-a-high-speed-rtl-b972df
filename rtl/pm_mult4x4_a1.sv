// 4x4 bit unsigned multiplier, architecture 1.
// The operands are cut into 2-bit halves (a3a2 | a1a0, b3b2 | b1b0); four
// 2x2 multipliers form the four cross products and pm_combine_a1 sums them
// with two 8-bit ripple carry adders into p = s7..s0 = a * b.
// Follows the described structure (four 2x2 cells, 8-bit adders); see
// pm_combine_a1 for the order of the additions. Combinational.
module pm_mult4x4_a1 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q_ll, q_hl, q_lh, q_hh;

  pm_mult2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q_ll));
  pm_mult2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q_hl));
  pm_mult2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q_lh));
  pm_mult2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q_hh));

  pm_combine_a1 #(.H(2)) u_sum (
    .q_ll(q_ll), .q_hl(q_hl), .q_lh(q_lh), .q_hh(q_hh), .p(p)
  );
endmodule
