// lmdpl_gf16_mul_op: operation layer of a masked GF(16) multiplier.
//
// Dual-rail mirror of lmdpl_gf16_mul_mtg: three masked GF(4) multipliers
// and monotonic dual-rail XORs for C1 = P2^P1 and C0 = z*P0 ^ P1.
// Combinational; pre-charged inputs give a pre-charged output.
module lmdpl_gf16_mul_op
  import lmdpl_pkg::*;
(
  input  dr4_t        a,
  input  dr4_t        b,
  input  logic [71:0] t,
  output dr4_t        c
);
  dr2_t a1, a0, b1, b0, p0, p1, p2, p0z, c1, c0;

  assign a1 = '{t: a.t[3:2], f: a.f[3:2]};
  assign a0 = '{t: a.t[1:0], f: a.f[1:0]};
  assign b1 = '{t: b.t[3:2], f: b.f[3:2]};
  assign b0 = '{t: b.t[1:0], f: b.f[1:0]};

  lmdpl_gf4_mul_op u_p0 (.a(a1), .b(b1), .t(t[23:0]),  .c(p0));
  lmdpl_gf4_mul_op u_p1 (.a(a0), .b(b0), .t(t[47:24]), .c(p1));
  lmdpl_gf4_mul_op u_p2 (.a(dr_xor2(a1, a0)), .b(dr_xor2(b1, b0)), .t(t[71:48]), .c(p2));

  always_comb begin
    // z * p0: bit 1 = p0[1]^p0[0], bit 0 = p0[1]
    {p0z.t[1], p0z.f[1]} = dr_xor1(p0.t[1], p0.f[1], p0.t[0], p0.f[0]);
    p0z.t[0] = p0.t[1];
    p0z.f[0] = p0.f[1];
    c1 = dr_xor2(p2, p1);
    c0 = dr_xor2(p0z, p1);
  end

  assign c = '{t: {c1.t, c0.t}, f: {c1.f, c0.f}};
endmodule
