// Partial-product summation of architecture 2 (half-width ripple adders).
// Same four H x H sub-products as architecture 1 (q_ll = aL*bL,
// q_hl = aH*bL, q_lh = aL*bH, q_hh = aH*bH), but only 2H-bit ripple
// carry adders are used, three of them:
//   p[H-1:0]      = q_ll[H-1:0]                     (no adder)
//   RCA1: x, c1   = q_hl + q_lh
//   RCA2: y, c2   = x + q_ll[2H-1:H]
//   p[2H-1:H]     = y[H-1:0]
//   RCA3: p[4H-1:2H] = q_hh + {c1|c2 at bit H, y[2H-1:H]}
// c1 and c2 are never both 1 (if q_hl + q_lh overflows, x is small enough
// that RCA2 cannot overflow), so their OR is their sum. For the 4x4
// multiplier these are the 4-bit ripple carry adders of architecture 2.
// The adder width (4-bit ripple carry for the 4x4 case) follows the
// described architecture; the order of the three additions is the usual one
// for this split and is this design's choice. Combinational.
module pm_combine_a2 #(
  parameter int unsigned H = 2
) (
  input  logic [2*H-1:0] q_ll,
  input  logic [2*H-1:0] q_hl,
  input  logic [2*H-1:0] q_lh,
  input  logic [2*H-1:0] q_hh,
  output logic [4*H-1:0] p
);
  logic [2*H-1:0] x, y, top_in;
  logic           c1, c2, c3;

  pm_rca #(.W(2*H)) u_rca1 (.a(q_hl), .b(q_lh), .ci(1'b0), .s(x), .co(c1));
  pm_rca #(.W(2*H)) u_rca2 (.a(x), .b({{H{1'b0}}, q_ll[2*H-1:H]}), .ci(1'b0),
                            .s(y), .co(c2));

  if (H > 1) begin : g_wide
    assign top_in = {{(H-1){1'b0}}, c1 | c2, y[2*H-1:H]};
  end else begin : g_narrow
    assign top_in = {c1 | c2, y[2*H-1:H]};
  end

  pm_rca #(.W(2*H)) u_rca3 (.a(q_hh), .b(top_in), .ci(1'b0),
                            .s(p[4*H-1:2*H]), .co(c3));

  assign p[H-1:0]   = q_ll[H-1:0];
  assign p[2*H-1:H] = y[H-1:0];

  // The last carry is zero for every input; it is left unused on purpose.
  logic unused_carry;
  assign unused_carry = c3;
endmodule
