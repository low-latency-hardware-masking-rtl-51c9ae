// lmdpl_gf4_mul_mtg: mask layer of a masked GF(4) multiplier (Karatsuba form).
//
// GF(4) = GF(2)[z]/(z^2+z+1). The product c = a*b uses three AND gadgets:
//   g0 = a1&b1, g1 = a0&b0, g2 = (a1^a0)&(b1^b0),  c1 = g2^g1, c0 = g0^g1.
// Gadget k takes its fresh output mask from r[k] and writes its table to
// t[8k +: 8]. The product mask c_m is the same XOR network applied to the
// gadget output masks. Mirror of lmdpl_gf4_mul_op; combinational.
// The tower-field decomposition is this design's own choice.
module lmdpl_gf4_mul_mtg (
  input  logic [1:0]  a_m,
  input  logic [1:0]  b_m,
  input  logic [2:0]  r,
  output logic [1:0]  c_m,
  output logic [23:0] t
);
  lmdpl_and_mtg u_g0 (.a_m(a_m[1]),          .b_m(b_m[1]),          .r(r[0]), .t(t[7:0]));
  lmdpl_and_mtg u_g1 (.a_m(a_m[0]),          .b_m(b_m[0]),          .r(r[1]), .t(t[15:8]));
  lmdpl_and_mtg u_g2 (.a_m(a_m[1] ^ a_m[0]), .b_m(b_m[1] ^ b_m[0]), .r(r[2]), .t(t[23:16]));

  assign c_m = {r[2] ^ r[1], r[0] ^ r[1]};
endmodule
