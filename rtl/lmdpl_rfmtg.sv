// lmdpl_rfmtg: round-function mask-table generator (RFMTG).
//
// Works one cycle ahead of the operation layer on the mask share of the
// AES state. Given the mask m_state of the state that an operation layer
// will evaluate next, it builds the 16 S-box tables for that round and
// returns m_next, the mask of the round result.
//   encryption (inv = 0): ShiftRows, SubBytes, MixColumns unless `last`,
//                         add the round-key mask m_rk;
//   decryption (inv = 1): InvShiftRows, InvSubBytes, add m_rk,
//                         InvMixColumns unless `last`.
// The S-box at byte position j (after the row shift) uses r[36j +: 36] and
// writes t[288j +: 288]; the caller registers t for the operation layer.
// The order ShiftRows, SubBytes, MixColumns follows the document's block
// diagram of the round mask-table generator. That diagram also shows a
// register between SubBytes and MixColumns; here the whole mask round is
// one combinational step and the registers sit in the top level.
// Byte i of a 128-bit word is bits [127-8i -: 8] (AES column-major order).
module lmdpl_rfmtg
  import lmdpl_pkg::*;
(
  input  logic [127:0]          m_state,
  input  logic [127:0]          m_rk,
  input  logic                  inv,
  input  logic                  last,
  input  logic [DATA_RND_W-1:0] r,
  output logic [127:0]          m_next,
  output logic [DATA_TBL_W-1:0] t
);
  logic [7:0] sb [16];
  logic [127:0] sb_w, mc_w, ak_w, imc_w;

  for (genvar j = 0; j < 16; j++) begin : g_sbox
    lmdpl_sbox_mtg u_sbox (
      .m_in (inv ? m_state[127 - 8*isr_src(j) -: 8] : m_state[127 - 8*sr_src(j) -: 8]),
      .inv  (inv),
      .r    (r[SBOX_RND_W*j +: SBOX_RND_W]),
      .m_out(sb[j]),
      .t    (t[SBOX_TBL_W*j +: SBOX_TBL_W])
    );
    assign sb_w[127 - 8*j -: 8] = sb[j];
  end

  assign ak_w = sb_w ^ m_rk;

  for (genvar c = 0; c < 4; c++) begin : g_mc
    assign mc_w[127 - 32*c -: 32]  = mixcol(sb_w[127 - 32*c -: 32]);
    assign imc_w[127 - 32*c -: 32] = inv_mixcol(ak_w[127 - 32*c -: 32]);
  end

  always_comb begin
    if (inv) m_next = last ? ak_w : imc_w;
    else     m_next = (last ? sb_w : mc_w) ^ m_rk;
  end
endmodule
