// Partial-product summation of architecture 1 (wide adders).
// An N x N product with N = 2H is split into four H x H sub-products:
//   q_ll = aL*bL, q_hl = aH*bL, q_lh = aL*bH, q_hh = aH*bH  (2H bits each)
// and p = q_ll + (q_hl << H) + (q_lh << H) + (q_hh << 2H).
// q_ll and q_hh do not overlap, so {q_hh, q_ll} is formed by wiring alone.
// Two full-width (4H-bit) ripple carry adders then add the two middle
// terms one after the other. For the 4x4 multiplier these are the 8-bit
// adders of architecture 1. Which two terms the first adder takes is this
// design's choice; the text only says that 8-bit adders are used.
// No carry leaves the second adder: the product always fits in 4H bits.
// Combinational.
module pm_combine_a1 #(
  parameter int unsigned H = 2
) (
  input  logic [2*H-1:0] q_ll,
  input  logic [2*H-1:0] q_hl,
  input  logic [2*H-1:0] q_lh,
  input  logic [2*H-1:0] q_hh,
  output logic [4*H-1:0] p
);
  logic [4*H-1:0] outer, mid1, mid2, sum1;
  logic           co1, co2;

  assign outer = {q_hh, q_ll};
  assign mid1  = {{H{1'b0}}, q_hl, {H{1'b0}}};
  assign mid2  = {{H{1'b0}}, q_lh, {H{1'b0}}};

  pm_rca #(.W(4*H)) u_add1 (.a(outer), .b(mid1), .ci(1'b0), .s(sum1), .co(co1));
  pm_rca #(.W(4*H)) u_add2 (.a(sum1),  .b(mid2), .ci(1'b0), .s(p),    .co(co2));

  // Both carries are zero for every input (the sums never exceed the product).
  // They are left unused on purpose.
  logic unused_carries;
  assign unused_carries = co1 | co2;
endmodule
