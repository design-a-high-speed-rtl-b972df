// Complex multiplier, four real multipliers solution.
//   (ar + j ai) * (br + j bi) = (ar*br - ai*bi) + j (ar*bi + ai*br)
// Four signed N x N multiplications run in parallel on the proposed
// multiplier (pm_smul around pm_mult); one subtraction and one addition
// finish the product. Operands are N-bit two's complement; results are
// 2N+1 bits, one more than a single product, because ar*bi + ai*br reaches
// 2^(2N-1) when all four parts are -2^(N-1). The final adder and subtractor
// are written as plain + and - (the text does not describe them).
// Combinational: outputs follow inputs after one multiplier plus one adder.
module cmul4 #(
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
  logic signed [2*N-1:0] m_rr, m_ii, m_ri, m_ir;

  pm_smul #(.N(N), .EXT(1'b0), .ARCH(ARCH)) u_rr (.x(ar), .y(br), .p(m_rr));
  pm_smul #(.N(N), .EXT(1'b0), .ARCH(ARCH)) u_ii (.x(ai), .y(bi), .p(m_ii));
  pm_smul #(.N(N), .EXT(1'b0), .ARCH(ARCH)) u_ri (.x(ar), .y(bi), .p(m_ri));
  pm_smul #(.N(N), .EXT(1'b0), .ARCH(ARCH)) u_ir (.x(ai), .y(br), .p(m_ir));

  assign pr = (2*N+1)'(m_rr) - (2*N+1)'(m_ii);
  assign pi = (2*N+1)'(m_ri) + (2*N+1)'(m_ir);
endmodule
