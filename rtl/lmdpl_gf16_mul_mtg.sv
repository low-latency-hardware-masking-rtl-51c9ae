// lmdpl_gf16_mul_mtg: mask layer of a masked GF(16) multiplier.
//
// GF(16) = GF(4)[w]/(w^2+w+z), element {A1,A0}. With Karatsuba,
//   C1 = (A1^A0)(B1^B0) ^ A0B0,   C0 = z*(A1B1) ^ A0B0,
// three GF(4) multipliers (nine AND gadgets): P0 = A1B1 uses r[2:0] and
// t[23:0], P1 = A0B0 uses r[5:3] and t[47:24], P2 = (A1^A0)(B1^B0) uses
// r[8:6] and t[71:48]. Mirror of lmdpl_gf16_mul_op; combinational.
module lmdpl_gf16_mul_mtg (
  input  logic [3:0]  a_m,
  input  logic [3:0]  b_m,
  input  logic [8:0]  r,
  output logic [3:0]  c_m,
  output logic [71:0] t
);
  logic [1:0] p0, p1, p2;

  lmdpl_gf4_mul_mtg u_p0 (.a_m(a_m[3:2]), .b_m(b_m[3:2]), .r(r[2:0]), .c_m(p0), .t(t[23:0]));
  lmdpl_gf4_mul_mtg u_p1 (.a_m(a_m[1:0]), .b_m(b_m[1:0]), .r(r[5:3]), .c_m(p1), .t(t[47:24]));
  lmdpl_gf4_mul_mtg u_p2 (.a_m(a_m[3:2] ^ a_m[1:0]), .b_m(b_m[3:2] ^ b_m[1:0]),
                          .r(r[8:6]), .c_m(p2), .t(t[71:48]));

  // z * p0 = {p0[1]^p0[0], p0[1]}
  assign c_m = {p2 ^ p1, {p0[1] ^ p0[0], p0[1]} ^ p1};
endmodule
