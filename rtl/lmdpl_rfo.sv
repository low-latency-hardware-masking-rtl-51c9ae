// lmdpl_rfo: round-function operation layer (RFO), data and key.
//
// One full AES-128 round on the dual-rail operation shares, purely
// combinational. Encryption (inv = 0):
//   key : rk_next = next round key of rk: SubWord(RotWord(w3)) through four
//         masked S-boxes (tables t_key[288k +: 288]), Rcon added as a rail
//         swap, then the XOR chain;
//   data: ShiftRows, 16 masked S-boxes (tables t_data[288j +: 288] for the
//         byte at position j after ShiftRows), MixColumns unless `last`,
//         AddRoundKey with rk_next.
// Decryption (inv = 1):
//   key : rk_next = previous round key of rk (w3..w1 by XOR of neighbours,
//         then w0 ^ SubWord(RotWord(w3')) ^ Rcon);
//   data: InvShiftRows, 16 masked inverse S-boxes, AddRoundKey with
//         rk_next, InvMixColumns unless `last`.
// All gates are monotonic (the mode and `last` are public control bits), so
// an all-zero (pre-charged) input gives an all-zero output; the top
// instantiates two RFOs that take turns, one evaluating while the other is
// pre-charged, as the document's low-latency construction does. The split
// into a data and a key operation layer follows the document's area table;
// ShiftRows before SubBytes follows its mask-table generator diagram; the
// decryption round order is this design's.
module lmdpl_rfo
  import lmdpl_pkg::*;
(
  input  dr_state_t             st,
  input  dr_state_t             rk,
  input  logic [DATA_TBL_W-1:0] t_data,
  input  logic [KEY_TBL_W-1:0]  t_key,
  input  logic [7:0]            rcon,
  input  logic                  inv,
  input  logic                  last,
  output dr_state_t             st_next,
  output dr_state_t             rk_next
);
  // ---------------------------------------------------------------- key
  dr8_t sw [4];
  dr8_t bw [16];   // backward: bytes 4..15 of the previous round key

  always_comb begin
    for (int b = 4; b < 16; b++) bw[b] = dr_xor8(rk[b], rk[b-4]);
    for (int b = 0; b < 4; b++) bw[b] = rk[b];
  end

  for (genvar k = 0; k < 4; k++) begin : g_ksbox
    dr8_t so;
    lmdpl_sbox_op u_sbox (
      .x  (inv ? bw[12 + (k+1)%4] : rk[12 + (k+1)%4]),
      .inv(1'b0),
      .t  (t_key[SBOX_TBL_W*k +: SBOX_TBL_W]),
      .y  (so)
    );
    assign sw[k] = (k == 0) ? dr_const8(so, rcon) : so;
  end

  always_comb begin
    for (int b = 0; b < 4; b++) rk_next[b] = dr_xor8(rk[b], sw[b]);
    for (int b = 4; b < 16; b++) rk_next[b] = inv ? bw[b] : dr_xor8(rk[b], rk_next[b-4]);
  end

  // --------------------------------------------------------------- data
  dr_state_t sb, mc, ak, imc;

  for (genvar j = 0; j < 16; j++) begin : g_sbox
    lmdpl_sbox_op u_sbox (
      .x  (inv ? st[isr_src(j)] : st[sr_src(j)]),
      .inv(inv),
      .t  (t_data[SBOX_TBL_W*j +: SBOX_TBL_W]),
      .y  (sb[j])
    );
  end

  always_comb
    for (int i = 0; i < 16; i++) ak[i] = dr_xor8(sb[i], rk_next[i]);

  // One process per column keeps each unrolled body small.
  for (genvar c = 0; c < 4; c++) begin : g_col
    always_comb begin
      dr8_t col [4];
      dr8_t res [4];
      for (int r = 0; r < 4; r++) col[r] = sb[4*c + r];
      dr_mixcol(col, res);
      for (int r = 0; r < 4; r++) mc[4*c + r] = res[r];
    end

    always_comb begin
      dr8_t col [4];
      dr8_t res [4];
      for (int r = 0; r < 4; r++) col[r] = ak[4*c + r];
      dr_inv_mixcol(col, res);
      for (int r = 0; r < 4; r++) imc[4*c + r] = res[r];
    end
  end

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      if (inv) st_next[i] = last ? ak[i] : imc[i];
      else     st_next[i] = dr_xor8(last ? sb[i] : mc[i], rk_next[i]);
    end
  end
endmodule
