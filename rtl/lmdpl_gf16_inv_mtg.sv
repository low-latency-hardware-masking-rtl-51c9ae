// lmdpl_gf16_inv_mtg: mask layer of a masked GF(16) inverter.
//
// For A = A1*w + A0 in GF(4)[w]/(w^2+w+z):
//   delta = z*A1^2 ^ A1*A0 ^ A0^2,  D = delta^-1 = delta^2 (in GF(4)),
//   A^-1  = (A1*D)*w + (A1^A0)*D.
// Zero maps to zero. Three masked GF(4) multipliers: A1*A0 (r[2:0],
// t[23:0]), A1*D (r[5:3], t[47:24]), (A1^A0)*D (r[8:6], t[71:48]); the
// squarings are linear and applied to the mask shares directly.
// Mirror of lmdpl_gf16_inv_op; combinational.
module lmdpl_gf16_inv_mtg
  import lmdpl_pkg::*;
(
  input  logic [3:0]  a_m,
  input  logic [8:0]  r,
  output logic [3:0]  b_m,
  output logic [71:0] t
);
  logic [1:0] p0, d_m, p1, p2;

  lmdpl_gf4_mul_mtg u_p0 (.a_m(a_m[3:2]), .b_m(a_m[1:0]), .r(r[2:0]), .c_m(p0), .t(t[23:0]));

  assign d_m = gf4_sq(gf4_sqz(a_m[3:2]) ^ p0 ^ gf4_sq(a_m[1:0]));

  lmdpl_gf4_mul_mtg u_p1 (.a_m(a_m[3:2]), .b_m(d_m), .r(r[5:3]), .c_m(p1), .t(t[47:24]));
  lmdpl_gf4_mul_mtg u_p2 (.a_m(a_m[3:2] ^ a_m[1:0]), .b_m(d_m), .r(r[8:6]), .c_m(p2), .t(t[71:48]));

  assign b_m = {p1, p2};
endmodule
