// Half adder: sum = a XOR b, carry = a AND b.
// Purely combinational, no clock. It is the adding cell of the 2x2 multiplier
// (pm_mult2x2), which is described as two half adders and four AND gates.
module pm_half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
