// lmdpl_gf4_mul_op: operation layer of a masked GF(4) multiplier.
//
// Dual-rail mirror of lmdpl_gf4_mul_mtg: three LMDPL AND gadgets on
// (a1,b1), (a0,b0) and (a1^a0, b1^b0), combined by monotonic dual-rail XORs
// into c1 = g2^g1, c0 = g0^g1. Table k is t[8k +: 8]. Combinational;
// pre-charged inputs give a pre-charged output.
module lmdpl_gf4_mul_op
  import lmdpl_pkg::*;
(
  input  dr2_t        a,
  input  dr2_t        b,
  input  logic [23:0] t,
  output dr2_t        c
);
  logic [1:0] a10, b10, g0, g1, g2;

  assign a10 = dr_xor1(a.t[1], a.f[1], a.t[0], a.f[0]);
  assign b10 = dr_xor1(b.t[1], b.f[1], b.t[0], b.f[0]);

  lmdpl_and_op u_g0 (.a({a.t[1], a.f[1]}), .b({b.t[1], b.f[1]}), .t(t[7:0]),   .x(g0));
  lmdpl_and_op u_g1 (.a({a.t[0], a.f[0]}), .b({b.t[0], b.f[0]}), .t(t[15:8]),  .x(g1));
  lmdpl_and_op u_g2 (.a(a10),              .b(b10),              .t(t[23:16]), .x(g2));

  logic [1:0] c1, c0;
  assign c1 = dr_xor1(g2[1], g2[0], g1[1], g1[0]);
  assign c0 = dr_xor1(g0[1], g0[0], g1[1], g1[0]);
  assign c  = '{t: {c1[1], c0[1]}, f: {c1[0], c0[0]}};
endmodule
