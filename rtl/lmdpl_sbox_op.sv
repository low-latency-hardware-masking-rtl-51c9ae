// lmdpl_sbox_op: operation layer of one masked AES S-box in LMDPL.
//
// Input: the dual-rail operation share of the S-box input byte and the
// registered 288-bit table from lmdpl_sbox_mtg. Output: the dual-rail
// operation share of S(x); S(x) = y ^ m_out where m_out is the mask share
// computed by lmdpl_sbox_mtg. Steps: dual-rail basis change into the tower
// field, GF(256) inversion with 36 masked AND gadgets (same structure and
// table slices as lmdpl_sbox_mtg), basis change back combined with the
// linear part of the affine map, and the affine constant 0x63 as a rail
// swap. With `inv` = 1 it computes the inverse S-box instead: 0x63 is
// added first, then one matrix does the inverse affine linear part and the
// basis change, then the same inversion and the plain basis change back.
// `inv` is a public mode bit. The whole path is combinational and
// monotonic: an all-zero (pre-charged) input gives an all-zero output, and
// in evaluation every output rail rises at most once.
module lmdpl_sbox_op
  import lmdpl_pkg::*;
(
  input  dr8_t                  x,
  input  logic                  inv,
  input  logic [SBOX_TBL_W-1:0] t,
  output dr8_t                  y
);
  dr8_t g;
  dr4_t g1, g0, p0, delta, d, q1, q0;

  assign g  = inv ? dr_lin8(INV_IN, dr_const8(x, AFF_C)) : dr_lin8(PHI, x);
  assign g1 = '{t: g.t[7:4], f: g.f[7:4]};
  assign g0 = '{t: g.t[3:0], f: g.f[3:0]};

  lmdpl_gf16_mul_op u_p0 (.a(g1), .b(g0), .t(t[71:0]), .c(p0));

  assign delta = dr_xor4(dr_xor4(dr_lin4(SQM16, g1), p0), dr_lin4(SQ16, g0));

  lmdpl_gf16_inv_op u_inv (.a(delta), .t(t[143:72]), .b(d));
  lmdpl_gf16_mul_op u_q1  (.a(g1), .b(d), .t(t[215:144]), .c(q1));
  lmdpl_gf16_mul_op u_q0  (.a(dr_xor4(g1, g0)), .b(d), .t(t[287:216]), .c(q0));

  dr8_t q;
  assign q = '{t: {q1.t, q0.t}, f: {q1.f, q0.f}};
  assign y = inv ? dr_lin8(PHI_INV, q) : dr_const8(dr_lin8(OUT_AFF, q), AFF_C);
endmodule
