// 2x2 bit unsigned multiplier, the leaf cell of every larger multiplier here.
// Four AND gates form the partial products a_i*b_j; two half adders add them:
//   p0 = a0b0
//   HA1: a1b0 + a0b1 -> p1, carry c1
//   HA2: a1b1 + c1   -> p2, p3
// so p = {p3 p2 p1 p0} = a * b (the product bits the text calls c2 s2 s1 s0).
// This gate structure follows the described cell exactly. Combinational.
module pm_mult2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp10, pp01, pp11;
  logic c1;

  assign pp00 = a[0] & b[0];
  assign pp10 = a[1] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp11 = a[1] & b[1];

  assign p[0] = pp00;

  pm_half_adder u_ha1 (.a(pp10), .b(pp01), .s(p[1]), .c(c1));
  pm_half_adder u_ha2 (.a(pp11), .b(c1),   .s(p[2]), .c(p[3]));
endmodule
