// Complex multiplier pair on the proposed N x N multiplier.
// Both complex multiplication solutions are built side by side on the same
// operands so they can be compared:
//   four-multiplier solution  (cmul4): pr4, pi4
//   three-multiplier solution (cmul3): pr3, pi3
// Each computes (ar + j ai) * (br + j bi) for N-bit two's complement parts;
// results are 2N+1 bits. Their real multiplications all run on the
// N x N multiplier built from 2x2 cells; ARCH selects architecture 1
// (wide adders) or architecture 2 (half-width ripple carry adders, the
// default) for all of them. Placing both solutions in one top is this
// design's choice. Fully combinational: there is no clock or reset, and
// every output settles one combinational delay after the inputs change.
module cmul_top #(
  parameter int unsigned   N    = 8,
  parameter pm_pkg::arch_e ARCH = pm_pkg::ARCH_RCA
) (
  input  logic signed [N-1:0] ar,
  input  logic signed [N-1:0] ai,
  input  logic signed [N-1:0] br,
  input  logic signed [N-1:0] bi,
  output logic signed [2*N:0] pr4,
  output logic signed [2*N:0] pi4,
  output logic signed [2*N:0] pr3,
  output logic signed [2*N:0] pi3
);
  cmul4 #(.N(N), .ARCH(ARCH)) u_cmul4 (
    .ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr4), .pi(pi4)
  );

  cmul3 #(.N(N), .ARCH(ARCH)) u_cmul3 (
    .ar(ar), .ai(ai), .br(br), .bi(bi), .pr(pr3), .pi(pi3)
  );
endmodule
