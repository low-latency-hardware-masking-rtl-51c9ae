// lmdpl_gf16_inv_op: operation layer of a masked GF(16) inverter.
//
// Dual-rail mirror of lmdpl_gf16_inv_mtg: delta = z*A1^2 ^ A1*A0 ^ A0^2,
// D = delta^2, result {A1*D, (A1^A0)*D}. The squarings and the scaling by z
// are monotonic dual-rail linear maps; the three GF(4) products are masked.
// Combinational; pre-charged inputs give a pre-charged output.
module lmdpl_gf16_inv_op
  import lmdpl_pkg::*;
(
  input  dr4_t        a,
  input  logic [71:0] t,
  output dr4_t        b
);
  dr2_t a1, a0, p0, delta, d, p1, p2;

  assign a1 = '{t: a.t[3:2], f: a.f[3:2]};
  assign a0 = '{t: a.t[1:0], f: a.f[1:0]};

  lmdpl_gf4_mul_op u_p0 (.a(a1), .b(a0), .t(t[23:0]), .c(p0));

  assign delta = dr_xor2(dr_xor2(dr_gf4_sqz(a1), p0), dr_gf4_sq(a0));
  assign d     = dr_gf4_sq(delta);

  lmdpl_gf4_mul_op u_p1 (.a(a1), .b(d), .t(t[47:24]), .c(p1));
  lmdpl_gf4_mul_op u_p2 (.a(dr_xor2(a1, a0)), .b(d), .t(t[71:48]), .c(p2));

  assign b = '{t: {p1.t, p2.t}, f: {p1.f, p2.f}};
endmodule
