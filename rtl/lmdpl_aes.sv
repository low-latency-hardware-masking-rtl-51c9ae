// lmdpl_aes: first-order masked AES-128 encryption in LMDPL with one round
// per cycle.
//
// Every value is held as two shares, a mask share (suffix 0: x0, k0, y0)
// and an operation share (suffix 1: x1, k1, y1); the plain value is their
// XOR. The mask shares live in the mask-table generator layer: the round
// function generator (lmdpl_rfmtg) and the key-expansion generator
// (lmdpl_kexp_mtg) run one round ahead, fed with fresh randomness by
// lmdpl_prng, and write the gadget tables of the next round into a table
// register. The operation shares live in dual rail in two round-function
// operation layers, RFO1 and RFO2 (lmdpl_rfo), each with its own input
// registers (state and round key) and its own table register. The two
// layers take turns: while one evaluates a round, the other's input
// registers are pre-charged to all-zero, so the pre-charge phase that LMDPL
// needs costs no cycle. RFO1 evaluates the odd rounds and writes RFO2's
// registers, RFO2 evaluates the even rounds and writes RFO1's.
//
// Timing: in the cycle with start = 1 and busy = 0 the shares x0, x1, k0, k1
// and the mode bit `decrypt` are taken (x1 ^ k1 and x0 ^ k0 form the
// initial AddRoundKey), and the tables of round 1 are built. Rounds 1..10
// follow in the next ten cycles. done is high from the cycle after round 10
// until the next start; y0 and y1 then hold the result shares
// (result = y0 ^ y1). A start while busy is ignored. seed_load reseeds the
// PRNG.
// Encryption (decrypt = 0): x = plaintext, k = cipher key, y = ciphertext.
// Decryption (decrypt = 1): x = ciphertext, k = last round key (round key
// 10 of the AES-128 key schedule), y = plaintext; the key schedule is run
// backwards from it. The document's results table lists encryption/
// decryption variants; what the decryption key input is, is this design's
// choice.
// The two alternating operation layers, the one-round-ahead mask-table
// generation, the protected key expansion and the PRNG follow the
// document. Port names follow its block diagram (x0/x1, k0/k1, y0);
// register placement inside a round and the start/done handshake are this
// design's own.
module lmdpl_aes
  import lmdpl_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic [127:0] seed,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] x0,
  input  logic [127:0] x1,
  input  logic [127:0] k0,
  input  logic [127:0] k1,
  output logic         busy,
  output logic         done,
  output logic [127:0] y0,
  output logic [127:0] y1
);
  localparam int unsigned TBL_W = DATA_TBL_W + KEY_TBL_W;

  // ------------------------------------------------------------ control
  logic       load, mtg_en, mtg_sel, mtg_last, eval_en, eval_sel, last, inv;
  logic [7:0] rc;

  lmdpl_ctrl #(.NR(NR)) u_ctrl (
    .clk, .rst_n, .start, .decrypt, .inv, .load, .mtg_en, .mtg_round(), .mtg_sel, .mtg_last,
    .eval_en, .eval_sel, .round(), .rcon(rc), .last, .busy, .done
  );

  // ------------------------------------------------------- entropy engine
  logic [RND_W-1:0] rnd;

  lmdpl_prng #(.OUT_W(RND_W)) u_prng (
    .clk, .rst_n, .seed_load, .seed, .en(mtg_en), .rnd
  );

  // -------------------------------------------------- mask-table layer
  logic [127:0]      m_q, km_q, m_in, km_in, m_next, km_next;
  logic [DATA_TBL_W-1:0] t_data;
  logic [KEY_TBL_W-1:0]  t_key;
  logic [TBL_W-1:0]  tbl1_q, tbl2_q;

  assign m_in  = load ? (x0 ^ k0) : m_q;
  assign km_in = load ? k0 : km_q;

  lmdpl_kexp_mtg u_kmtg (
    .m_key(km_in), .inv, .r(rnd[DATA_RND_W +: KEY_RND_W]), .m_key_next(km_next), .t(t_key)
  );

  lmdpl_rfmtg u_rfmtg (
    .m_state(m_in), .m_rk(km_next), .inv, .last(mtg_last), .r(rnd[DATA_RND_W-1:0]),
    .m_next(m_next), .t(t_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_q    <= '0;
      km_q   <= '0;
      tbl1_q <= '0;
      tbl2_q <= '0;
    end else if (mtg_en) begin
      m_q  <= m_next;
      km_q <= km_next;
      if (mtg_sel) tbl2_q <= {t_key, t_data};
      else         tbl1_q <= {t_key, t_data};
    end
  end

  // ---------------------------------------------------- operation layer
  dr_state_t st1_q, st2_q, rk1_q, rk2_q;   // RFO input registers
  dr_state_t st1_n, st2_n, rk1_n, rk2_n;   // RFO outputs
  dr_state_t st_ld, rk_ld;                 // single- to dual-rail inputs

  lmdpl_rfo u_rfo1 (
    .st(st1_q), .rk(rk1_q), .t_data(tbl1_q[DATA_TBL_W-1:0]), .t_key(tbl1_q[TBL_W-1:DATA_TBL_W]),
    .rcon(rc), .inv, .last, .st_next(st1_n), .rk_next(rk1_n)
  );

  lmdpl_rfo u_rfo2 (
    .st(st2_q), .rk(rk2_q), .t_data(tbl2_q[DATA_TBL_W-1:0]), .t_key(tbl2_q[TBL_W-1:DATA_TBL_W]),
    .rcon(rc), .inv, .last, .st_next(st2_n), .rk_next(rk2_n)
  );

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      rk_ld[i] = to_dr8(k1[127 - 8*i -: 8]);
      st_ld[i] = dr_xor8(to_dr8(x1[127 - 8*i -: 8]), rk_ld[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st1_q <= '0;
      rk1_q <= '0;
      st2_q <= '0;
      rk2_q <= '0;
    end else if (load) begin
      st1_q <= st_ld;
      rk1_q <= rk_ld;
      st2_q <= '0;
      rk2_q <= '0;
    end else if (eval_en) begin
      // the evaluating layer is pre-charged, the other one receives the
      // round result (nothing after the last round)
      if (!eval_sel) begin
        st1_q <= '0;
        rk1_q <= '0;
        st2_q <= last ? '0 : st1_n;
        rk2_q <= last ? '0 : rk1_n;
      end else begin
        st2_q <= '0;
        rk2_q <= '0;
        st1_q <= last ? '0 : st2_n;
        rk1_q <= last ? '0 : rk2_n;
      end
    end
  end

  // ------------------------------------- dual- to single-rail conversion
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y0 <= '0;
      y1 <= '0;
    end else if (eval_en && last) begin
      y0 <= m_q;
      for (int i = 0; i < 16; i++) y1[127 - 8*i -: 8] <= eval_sel ? st2_n[i].t : st1_n[i].t;
    end
  end

  // the layer that does not evaluate is pre-charged
  a_precharge: assert property (@(posedge clk) disable iff (!rst_n)
    eval_en |-> (eval_sel ? (st1_q == '0 && rk1_q == '0) : (st2_q == '0 && rk2_q == '0)));
endmodule
