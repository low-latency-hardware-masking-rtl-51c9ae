// tb_lmdpl_round: one masked AES round, mask-table layer (lmdpl_rfmtg,
// lmdpl_kexp_mtg) feeding the operation layer (lmdpl_rfo) through a table
// register. For random states, round keys, masks and randomness, in every
// round number 1..10 (round 10 without MixColumns), the recombined outputs
// must equal a plain AES round and key-schedule step computed here; the
// same holds for a decryption round (InvShiftRows, InvSubBytes,
// AddRoundKey, InvMixColumns unless last) with the key schedule run
// backwards. The rails must be complementary, and a pre-charged (all-zero) operation
// share must give an all-zero result.
module tb_lmdpl_round;
  import lmdpl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [127:0]          m_state, m_rk, m_next, m_key, m_key_next;
  logic                  last, inv;
  logic [DATA_RND_W-1:0] r_data;
  logic [KEY_RND_W-1:0]  r_key;
  logic [DATA_TBL_W-1:0] t_data, t_data_q;
  logic [KEY_TBL_W-1:0]  t_key, t_key_q;
  dr_state_t             st, rk, st_next, rk_next;
  logic [7:0]            rc;

  lmdpl_kexp_mtg u_kmtg (.m_key(m_key), .inv(inv), .r(r_key), .m_key_next(m_key_next), .t(t_key));
  lmdpl_rfmtg    u_mtg  (.m_state(m_state), .m_rk(m_key_next), .inv(inv), .last(last), .r(r_data),
                         .m_next(m_next), .t(t_data));
  lmdpl_rfo      u_rfo  (.st(st), .rk(rk), .t_data(t_data_q), .t_key(t_key_q), .rcon(rc),
                         .inv(inv), .last(last), .st_next(st_next), .rk_next(rk_next));

  assign m_rk = m_key_next;

  always_ff @(posedge clk) begin
    t_data_q <= t_data;
    t_key_q  <= t_key;
  end

  int checks = 0, failures = 0;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  logic [7:0] sbox_t [256], isbox_t [256];

  function automatic logic [7:0] ref_sbox(logic [7:0] v);
    logic [7:0] inv = 8'h00, s;
    for (int c = 1; c < 256; c++) if (gmul(v, 8'(c)) == 8'h01) inv = 8'(c);
    for (int j = 0; j < 8; j++)
      s[j] = inv[j] ^ inv[(j+4)%8] ^ inv[(j+5)%8] ^ inv[(j+6)%8] ^ inv[(j+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [127:0] rnd128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] s_in, k_in, s_out, k_out, got_s, got_k;
    logic [7:0] s [16], k [16], t [16], tmp [4], rcv;
    for (int i = 0; i < 256; i++) sbox_t[i] = ref_sbox(8'(i));
    for (int i = 0; i < 256; i++) isbox_t[sbox_t[i]] = 8'(i);
    for (int n = 0; n < 80; n++) begin
      int rnum;
      bit dec;
      rnum = (n % 10) + 1;
      dec  = (n >= 40);
      s_in = rnd128(); k_in = rnd128();
      rcv = 8'h01;
      for (int i = 1; i < rnum; i++) rcv = gmul(rcv, 8'h02);
      // reference round
      for (int i = 0; i < 16; i++) begin
        s[i] = s_in[127 - 8*i -: 8];
        k[i] = k_in[127 - 8*i -: 8];
      end
      if (!dec) begin
        for (int b = 0; b < 4; b++) tmp[b] = sbox_t[k[12 + (b+1)%4]];
        tmp[0] ^= rcv;
        for (int b = 0; b < 4; b++) k[b] ^= tmp[b];
        for (int b = 4; b < 16; b++) k[b] ^= k[b-4];
        for (int i = 0; i < 16; i++) t[i] = sbox_t[s[(i%4) + 4*(((i/4) + (i%4)) % 4)]];
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            s[4*c+rr] = (rnum < 10) ? gmul(t[4*c+rr], 8'h02) ^ gmul(t[4*c+(rr+1)%4], 8'h03)
                                      ^ t[4*c+(rr+2)%4] ^ t[4*c+(rr+3)%4]
                                    : t[4*c+rr];
        for (int i = 0; i < 16; i++) s[i] ^= k[i];
      end else begin
        // previous round key
        for (int b = 15; b >= 4; b--) k[b] ^= k[b-4];
        for (int b = 0; b < 4; b++) tmp[b] = sbox_t[k[12 + (b+1)%4]];
        tmp[0] ^= rcv;
        for (int b = 0; b < 4; b++) k[b] ^= tmp[b];
        // InvShiftRows, InvSubBytes, AddRoundKey
        for (int i = 0; i < 16; i++) t[i] = isbox_t[s[(i%4) + 4*(((i/4) + 4 - (i%4)) % 4)]] ^ k[i];
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            s[4*c+rr] = (rnum < 10) ? gmul(t[4*c+rr], 8'h0e) ^ gmul(t[4*c+(rr+1)%4], 8'h0b)
                                      ^ gmul(t[4*c+(rr+2)%4], 8'h0d) ^ gmul(t[4*c+(rr+3)%4], 8'h09)
                                    : t[4*c+rr];
      end
      for (int i = 0; i < 16; i++) begin
        s_out[127 - 8*i -: 8] = s[i];
        k_out[127 - 8*i -: 8] = k[i];
      end

      // mask phase: tables for this round are built and registered
      @(negedge clk);
      last    = (rnum == 10);
      inv     = dec;
      rc      = rcv;
      m_state = (n == 0) ? '0 : rnd128();
      m_key   = (n == 1) ? '0 : rnd128();
      for (int w = 0; w < DATA_RND_W / 32; w++) r_data[32*w +: 32] = $urandom();
      for (int w = 0; w < KEY_RND_W / 16; w++) r_key[16*w +: 16] = 16'($urandom());
      st = '0;
      rk = '0;
      @(posedge clk);
      #1;
      checks++;
      if (st_next != '0 || rk_next != '0) begin
        failures++;
        $display("round %0d: pre-charged layer output not zero", rnum);
      end
      // evaluation phase: operation shares arrive, masks hold still
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        st[i] = to_dr8(s_in[127 - 8*i -: 8] ^ m_state[127 - 8*i -: 8]);
        rk[i] = to_dr8(k_in[127 - 8*i -: 8] ^ m_key[127 - 8*i -: 8]);
      end
      #1;
      for (int i = 0; i < 16; i++) begin
        got_s[127 - 8*i -: 8] = st_next[i].t;
        got_k[127 - 8*i -: 8] = rk_next[i].t;
        checks++;
        if (st_next[i].f != ~st_next[i].t || rk_next[i].f != ~rk_next[i].t) begin
          failures++;
          $display("round %0d byte %0d: rails not complementary", rnum, i);
        end
      end
      checks++;
      if ((got_k ^ m_key_next) != k_out) begin
        failures++;
        $display("round %0d key: got %032x want %032x", rnum, got_k ^ m_key_next, k_out);
      end
      checks++;
      if ((got_s ^ m_next) != s_out) begin
        failures++;
        $display("round %0d state: got %032x want %032x", rnum, got_s ^ m_next, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
