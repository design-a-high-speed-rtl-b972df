// Signed multiplier around the unsigned N x N core (pm_mult).
// Complex samples are two's complement, the core is unsigned, so the
// operands go through sign-magnitude conversion: the magnitudes are
// multiplied and the product is negated when exactly one operand is negative.
//   EXT = 0 : operands are N bits; |x| <= 2^(N-1) fits the N-bit core.
//   EXT = 1 : operands are N+1 bits (the sums ar+ai, br+bi of the three-
//             multiplier complex product). |x| can reach 2^N, one bit more
//             than the core takes; with |x| = xh*2^N + xl,
//               |x|*|y| = xl*yl + ((xh ? yl : 0) + (yh ? xl : 0)) * 2^N
//                         + (xh & yh) * 2^2N
//             so the core still does the whole xl*yl multiplication and only
//             AND-gated terms are added.
// Both the sign handling and the extension are this design's choices: the
// text does not say how signed complex parts reach the unsigned multiplier.
// Product width is 2W, W = N + EXT. Combinational.
module pm_smul #(
  parameter int unsigned   N    = 8,
  parameter bit            EXT  = 1'b0,
  parameter pm_pkg::arch_e ARCH = pm_pkg::ARCH_RCA
) (
  input  logic signed [N+EXT-1:0]     x,
  input  logic signed [N+EXT-1:0]     y,
  output logic signed [2*(N+EXT)-1:0] p
);
  localparam int unsigned W = N + EXT;

  logic [W-1:0]   mx, my;
  logic [2*N-1:0] core;
  logic [2*W-1:0] mag;
  logic           neg;

  assign mx  = x[W-1] ? W'(-x) : W'(x);
  assign my  = y[W-1] ? W'(-y) : W'(y);
  assign neg = x[W-1] ^ y[W-1];

  pm_mult #(.N(N), .ARCH(ARCH)) u_core (.a(mx[N-1:0]), .b(my[N-1:0]), .p(core));

  if (EXT) begin : g_ext
    logic [N:0]     xsum;
    assign xsum = (mx[N] ? {1'b0, my[N-1:0]} : '0)
                 + (my[N] ? {1'b0, mx[N-1:0]} : '0);
    assign mag = {1'b0, 1'b0, core}
               + ({{W{1'b0}}, xsum} << N)
               + ({{(2*W-1){1'b0}}, mx[N] & my[N]} << (2*N));
  end else begin : g_plain
    assign mag = core;
  end

  assign p = neg ? -$signed(mag) : $signed(mag);
endmodule
