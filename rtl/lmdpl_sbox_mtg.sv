// lmdpl_sbox_mtg: mask-table generator of one masked AES S-box.
//
// Input: the mask share m_in of the S-box input byte, 36 fresh random bits
// and `inv`, which selects the inverse S-box (decryption). Output: the
// tables of the 36 AND gadgets of the operation layer (lmdpl_sbox_op), 288
// bits, and the mask share m_out of the S-box output. The mask goes through
// the same linear steps as the operation share: basis change into
// GF(((2^2)^2)^2) (PHI, or PHI after the inverse affine linear part when
// inv = 1), inversion, and basis change back (with the affine linear part,
// or plain PHI^-1 when inv = 1). Every gadget output mask is a fresh random
// bit, so m_out is a linear function of r alone and does not depend on
// m_in. The affine constant 0x63 is handled on the operation share only.
// Inversion of G = G1*v + G0 (v^2 = v + M):
//   delta = M*G1^2 ^ G1*G0 ^ G0^2,  D = delta^-1,  G^-1 = (G1*D)*v + (G1^G0)*D.
// Slices: G1*G0 r[8:0]/t[71:0], inverse r[17:9]/t[143:72],
// G1*D r[26:18]/t[215:144], (G1^G0)*D r[35:27]/t[287:216].
// The 36 random bits and 288 table bits per S-box agree with the figures
// the document gives for its S-box; the tower-field decomposition is this
// design's own. Combinational; the caller registers t.
module lmdpl_sbox_mtg
  import lmdpl_pkg::*;
(
  input  logic [7:0]            m_in,
  input  logic                  inv,
  input  logic [SBOX_RND_W-1:0] r,
  output logic [7:0]            m_out,
  output logic [SBOX_TBL_W-1:0] t
);
  logic [7:0] g;
  logic [3:0] p0, delta, d, q1, q0;

  assign g = inv ? lin8(INV_IN, m_in) : lin8(PHI, m_in);

  lmdpl_gf16_mul_mtg u_p0 (.a_m(g[7:4]), .b_m(g[3:0]), .r(r[8:0]), .c_m(p0), .t(t[71:0]));

  assign delta = lin4(SQM16, g[7:4]) ^ p0 ^ lin4(SQ16, g[3:0]);

  lmdpl_gf16_inv_mtg u_inv (.a_m(delta), .r(r[17:9]), .b_m(d), .t(t[143:72]));
  lmdpl_gf16_mul_mtg u_q1  (.a_m(g[7:4]), .b_m(d), .r(r[26:18]), .c_m(q1), .t(t[215:144]));
  lmdpl_gf16_mul_mtg u_q0  (.a_m(g[7:4] ^ g[3:0]), .b_m(d), .r(r[35:27]), .c_m(q0), .t(t[287:216]));

  assign m_out = inv ? lin8(PHI_INV, {q1, q0}) : lin8(OUT_AFF, {q1, q0});
endmodule
