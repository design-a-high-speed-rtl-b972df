// Complex multiplier, three real multipliers solution.
// Trades one multiplier for three pre/post additions:
//   k1 = ar*br, k2 = ai*bi, k3 = (ar+ai)*(br+bi)
//   pr = k1 - k2
//   pi = k3 - k1 - k2
// k1 and k2 are signed N x N products on the proposed multiplier; k3 takes
// the (N+1)-bit sums and uses the extended form of pm_smul (the same N x N
// core plus AND-gated correction terms for the extra magnitude bit).
// Which three-multiplier identity is used is this design's choice; the text
// only names the solution. Outputs are 2N+1 bits, the same as cmul4, and
// equal to cmul4's for every input. Adders are written as plain + and -.
// Combinational: pre-adder, multiplier and two post-subtractions in series.
module cmul3 #(
  parameter int unsigned   N    = 8,
  parameter pm_pkg::arch_e ARCH = pm_pkg::ARCH_RCA
) (
  input  logic signed [N-1:0] ar,
  input  logic signed [N-1:0] ai,
  input  logic signed [N-1:0] br,
  input  logic signed [N-1:0] bi,
  output logic signed [2*N:0] pr,
  output logic signed [2*N:0] pi
);
  logic signed [N:0]       sa, sb;
  logic signed [2*N-1:0]   k1, k2;
  logic signed [2*N+1:0]   k3;
  logic signed [2*N+1:0]   pi_full;

  assign sa = (N+1)'(ar) + (N+1)'(ai);
  assign sb = (N+1)'(br) + (N+1)'(bi);

  pm_smul #(.N(N), .EXT(1'b0), .ARCH(ARCH)) u_k1 (.x(ar), .y(br), .p(k1));
  pm_smul #(.N(N), .EXT(1'b0), .ARCH(ARCH)) u_k2 (.x(ai), .y(bi), .p(k2));
  pm_smul #(.N(N), .EXT(1'b1), .ARCH(ARCH)) u_k3 (.x(sa), .y(sb), .p(k3));

  assign pr      = (2*N+1)'(k1) - (2*N+1)'(k2);
  // k3 - k1 - k2 = ar*bi + ai*br always fits in 2N+1 bits; the top bit of
  // the 2N+2-bit difference is only a sign copy.
  assign pi_full = k3 - (2*N+2)'(k1) - (2*N+2)'(k2);
  assign pi      = pi_full[2*N:0];

  logic unused_sign_copy;
  assign unused_sign_copy = pi_full[2*N+1];
endmodule
