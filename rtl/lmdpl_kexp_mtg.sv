// lmdpl_kexp_mtg: key-expansion mask-table generator.
//
// Mask-layer half of the protected AES-128 key schedule. From the mask
// m_key of one round key it returns the mask of the round key used next and
// the tables of the four S-boxes that SubWord needs (S-box k uses
// r[36k +: 36] and writes t[288k +: 288]).
//   forward (inv = 0, encryption): S-box inputs RotWord(w3), bytes 13, 14,
//     15, 12; w0' = w0 ^ SubWord, w1' = w1 ^ w0', w2' = w2 ^ w1',
//     w3' = w3 ^ w2'.
//   backward (inv = 1, decryption): w3' = w3 ^ w2, w2' = w2 ^ w1,
//     w1' = w1 ^ w0, S-box inputs RotWord(w3'), w0' = w0 ^ SubWord.
// The round constant is a public value and is added on the operation share
// only (lmdpl_rfo). The document names this block and its area; its
// contents here are the AES key schedule split like the round function.
// Combinational; the caller registers t and m_key_next.
module lmdpl_kexp_mtg
  import lmdpl_pkg::*;
(
  input  logic [127:0]         m_key,
  input  logic                 inv,
  input  logic [KEY_RND_W-1:0] r,
  output logic [127:0]         m_key_next,
  output logic [KEY_TBL_W-1:0] t
);
  logic [31:0] sw, rw;
  logic [31:0] w0, w1, w2, w3;      // forward
  logic [31:0] b1, b2, b3;          // backward (b0 = w0 of the result)

  assign b3 = m_key[31:0]  ^ m_key[63:32];
  assign b2 = m_key[63:32] ^ m_key[95:64];
  assign b1 = m_key[95:64] ^ m_key[127:96];
  assign rw = inv ? {b3[23:0], b3[31:24]} : {m_key[23:0], m_key[31:24]};

  for (genvar k = 0; k < 4; k++) begin : g_sbox
    lmdpl_sbox_mtg u_sbox (
      .m_in (rw[31 - 8*k -: 8]),
      .inv  (1'b0),
      .r    (r[SBOX_RND_W*k +: SBOX_RND_W]),
      .m_out(sw[31 - 8*k -: 8]),
      .t    (t[SBOX_TBL_W*k +: SBOX_TBL_W])
    );
  end

  assign w0 = m_key[127:96] ^ sw;
  assign w1 = m_key[95:64]  ^ w0;
  assign w2 = m_key[63:32]  ^ w1;
  assign w3 = m_key[31:0]   ^ w2;
  assign m_key_next = inv ? {w0, b1, b2, b3} : {w0, w1, w2, w3};
endmodule
