// N x N bit unsigned multiplier built by repeated halving.
// N must be a power of two. Each operand is cut into an upper and a lower
// half; four N/2 x N/2 multipliers form aL*bL, aH*bL, aL*bH and aH*bH and
// the selected summation network adds them into the 2N-bit product. The
// halving is unrolled into levels, from the bottom up:
//   level 2 (S = 4)  : (N/4)^2 4x4 multipliers of the chosen architecture,
//                      each made of four 2x2 cells, on every pair of
//                      4-bit operand slices
//   level k (S = 2^k): each S x S product of slices i, j is summed by
//                      pm_combine_a1 / pm_combine_a2 from the four S/2 x S/2
//                      products of level k-1 (slices 2i, 2i+1 x 2j, 2j+1)
// and level log2(N) holds the single N x N product. N = 2 is the 2x2 cell
// itself. ARCH picks architecture 1 (wide adders) or 2 (half-width ripple
// carry adders) at every level. Extending the 4x4 construction to larger N
// this way is this design's reading of the N x N multiplier; the default
// N = 8 matches the 8-bit operand buses of the complex multiplier.
// Combinational: p is valid one combinational delay after a and b.
module pm_mult #(
  parameter int unsigned   N    = 8,
  parameter pm_pkg::arch_e ARCH = pm_pkg::ARCH_RCA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned LV = $clog2(N);

  if (!pm_pkg::valid_size(N)) begin : g_bad_size
    $error("pm_mult: N must be a power of two, at least 2");
  end

  if (N == 2) begin : g_leaf
    pm_mult2x2 u_m (.a(a), .b(b), .p(p));
  end else begin : g_tree
    for (genvar k = 2; k <= LV; k++) begin : g_lv
      localparam int unsigned S = 1 << k;   // operand slice width
      localparam int unsigned C = N / S;    // slices per operand
      localparam int unsigned H = S / 2;
      logic [2*S-1:0] q [C][C];             // q[i][j] = a slice i * b slice j

      for (genvar i = 0; i < C; i++) begin : g_i
        for (genvar j = 0; j < C; j++) begin : g_j
          if (k == 2 && ARCH == pm_pkg::ARCH_WIDE) begin : g_4x4_a1
            pm_mult4x4_a1 u_m (.a(a[4*i +: 4]), .b(b[4*j +: 4]), .p(q[i][j]));
          end else if (k == 2) begin : g_4x4_a2
            pm_mult4x4_a2 u_m (.a(a[4*i +: 4]), .b(b[4*j +: 4]), .p(q[i][j]));
          end else if (ARCH == pm_pkg::ARCH_WIDE) begin : g_a1
            pm_combine_a1 #(.H(H)) u_sum (
              .q_ll(g_lv[k-1].q[2*i][2*j]),   .q_hl(g_lv[k-1].q[2*i+1][2*j]),
              .q_lh(g_lv[k-1].q[2*i][2*j+1]), .q_hh(g_lv[k-1].q[2*i+1][2*j+1]),
              .p(q[i][j])
            );
          end else begin : g_a2
            pm_combine_a2 #(.H(H)) u_sum (
              .q_ll(g_lv[k-1].q[2*i][2*j]),   .q_hl(g_lv[k-1].q[2*i+1][2*j]),
              .q_lh(g_lv[k-1].q[2*i][2*j+1]), .q_hh(g_lv[k-1].q[2*i+1][2*j+1]),
              .p(q[i][j])
            );
          end
        end
      end
    end
    assign p = g_lv[LV].q[0][0];
  end
endmodule
