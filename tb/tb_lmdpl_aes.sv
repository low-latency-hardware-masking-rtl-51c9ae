// tb_lmdpl_aes: end-to-end test of the masked AES-128 core at its default
// size. Encrypts the FIPS-197 example (key 000102..0f, plaintext
// 00112233..ff, ciphertext 69c4e0d8..c55a) and 24 random key/plaintext
// pairs, each split into random shares, and compares y0 ^ y1 with a plain
// AES-128 model written here (S-box built from the field inverse and the
// affine map). Each block is then decrypted by the core, from the
// ciphertext and the last round key (computed by the model), and must give
// the plaintext back; encryption and decryption alternate, so every block
// switches the mode. Also checks: the latency of 11 cycles from start to done;
// that RFO1 and RFO2 each evaluate 5 rounds per block and alternate; that
// the idle layer's input registers are pre-charged (all zero) in every
// round; that a start while busy is ignored; that the same block encrypted
// twice with the same input shares leaves with different output shares
// (fresh randomness) but the same ciphertext; and that a reseed of the
// PRNG works. Each of these mechanisms is counted and must occur.
module tb_lmdpl_aes;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, seed_load, start, decrypt, busy, done;
  logic [127:0] seed, x0, x1, k0, k1, y0, y1;

  lmdpl_aes u_dut (.*);

  int checks = 0, failures = 0;
  int n_rfo1 = 0, n_rfo2 = 0, n_precharge = 0, n_last = 0, n_ignored = 0;
  int n_refresh = 0, n_reseed = 0, n_switch = 0;
  logic last_mode = 1'b0;
  int cyc = 0;

  always @(posedge clk) cyc++;

  // ---------------------------------------------------- reference model
  logic [7:0] sbox_t [256];

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] v);
    logic [7:0] inv = 8'h00, s;
    for (int c = 1; c < 256; c++) if (gmul(v, 8'(c)) == 8'h01) inv = 8'(c);
    for (int j = 0; j < 8; j++)
      s[j] = inv[j] ^ inv[(j+4)%8] ^ inv[(j+5)%8] ^ inv[(j+6)%8] ^ inv[(j+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [127:0] ref_aes(logic [127:0] pt, logic [127:0] key);
    logic [7:0] s [16], k [16], t [16], tmp [4];
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 16; i++) begin
      s[i] = pt[127 - 8*i -: 8] ^ key[127 - 8*i -: 8];
      k[i] = key[127 - 8*i -: 8];
    end
    for (int r = 1; r <= 10; r++) begin
      // key schedule
      for (int b = 0; b < 4; b++) tmp[b] = sbox_t[k[12 + (b+1)%4]];
      tmp[0] ^= rc;
      rc = gmul(rc, 8'h02);
      for (int b = 0; b < 4; b++) k[b] ^= tmp[b];
      for (int b = 4; b < 16; b++) k[b] ^= k[b-4];
      // SubBytes + ShiftRows
      for (int i = 0; i < 16; i++) t[i] = sbox_t[s[(i%4) + 4*(((i/4) + (i%4)) % 4)]];
      // MixColumns
      for (int c = 0; c < 4; c++) begin
        for (int rr = 0; rr < 4; rr++) begin
          if (r < 10)
            s[4*c+rr] = gmul(t[4*c+rr], 8'h02) ^ gmul(t[4*c+(rr+1)%4], 8'h03)
                      ^ t[4*c+(rr+2)%4] ^ t[4*c+(rr+3)%4];
          else
            s[4*c+rr] = t[4*c+rr];
        end
      end
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    for (int i = 0; i < 16; i++) ref_aes[127 - 8*i -: 8] = s[i];
  endfunction

  function automatic logic [127:0] ref_last_key(logic [127:0] key);
    logic [7:0] k [16], tmp [4];
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 16; i++) k[i] = key[127 - 8*i -: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int b = 0; b < 4; b++) tmp[b] = sbox_t[k[12 + (b+1)%4]];
      tmp[0] ^= rc;
      rc = gmul(rc, 8'h02);
      for (int b = 0; b < 4; b++) k[b] ^= tmp[b];
      for (int b = 4; b < 16; b++) k[b] ^= k[b-4];
    end
    for (int i = 0; i < 16; i++) ref_last_key[127 - 8*i -: 8] = k[i];
  endfunction

  function automatic logic [127:0] rnd128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  // ------------------------------------------------------------ monitors
  logic prev_sel;
  logic prev_eval = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (u_dut.eval_en) begin
      if (u_dut.eval_sel) n_rfo2++; else n_rfo1++;
      if (u_dut.last) n_last++;
      if (u_dut.eval_sel ? (u_dut.st1_q == '0 && u_dut.rk1_q == '0)
                         : (u_dut.st2_q == '0 && u_dut.rk2_q == '0)) n_precharge++;
      else begin
        failures++;
        $display("idle operation layer not pre-charged at cycle %0d", cyc);
      end
      if (prev_eval && !u_dut.last && prev_sel == u_dut.eval_sel) begin
        failures++;
        $display("operation layers did not alternate at cycle %0d", cyc);
      end
    end
    prev_eval <= u_dut.eval_en && !u_dut.last;
    prev_sel  <= u_dut.eval_sel;
  end

  // ------------------------------------------------------------ stimulus
  task automatic run_block(input bit dec, input logic [127:0] pt, key, m_pt, m_key,
                           input bit poke_start, output logic [127:0] o0, o1);
    int c0, lat;
    @(negedge clk);
    decrypt = dec;
    if (dec != last_mode) n_switch++;
    last_mode = dec;
    x0 = m_pt;  x1 = pt ^ m_pt;
    k0 = m_key; k1 = key ^ m_key;
    start = 1'b1;
    c0 = cyc;
    @(negedge clk);
    start = 1'b0;
    // scramble the inputs after the load cycle: they must not matter
    x0 = rnd128(); x1 = rnd128(); k0 = rnd128(); k1 = rnd128();
    decrypt = ~dec;
    if (poke_start) begin
      repeat (3) @(negedge clk);
      start = 1'b1;      // must be ignored while busy
      @(negedge clk);
      start = 1'b0;
      n_ignored++;
    end
    while (!done) @(negedge clk);
    lat = cyc - c0;
    checks++;
    if (lat != 11) begin
      failures++;
      $display("latency %0d cycles, expected 11", lat);
    end
    o0 = y0;
    o1 = y1;
  endtask

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pt, key, mp, mk, o0, o1, p0, p1, want;
    for (int i = 0; i < 256; i++) sbox_t[i] = ref_sbox(8'(i));
    rst_n = 1'b0; seed_load = 1'b0; start = 1'b0; seed = '0; decrypt = 1'b0;
    x0 = '0; x1 = '0; k0 = '0; k1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    seed = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;
    seed_load = 1'b1;
    @(negedge clk);
    seed_load = 1'b0;

    // FIPS-197 Appendix C.1
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt  = 128'h00112233445566778899aabbccddeeff;
    checks++;
    if (ref_aes(pt, key) != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("reference model disagrees with FIPS-197");
    end
    mp = rnd128(); mk = rnd128();
    run_block(1'b0, pt, key, mp, mk, 1'b0, o0, o1);
    checks++;
    if ((o0 ^ o1) != 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FIPS-197: got %032x", o0 ^ o1);
    end
    // same shares again: fresh randomness must give new output shares
    run_block(1'b0, pt, key, mp, mk, 1'b1, p0, p1);
    checks++;
    if ((p0 ^ p1) != (o0 ^ o1)) begin
      failures++;
      $display("second FIPS-197 run: got %032x", p0 ^ p1);
    end
    checks++;
    if (p0 == o0) begin
      failures++;
      $display("output mask share not refreshed");
    end else n_refresh++;
    // FIPS-197 Appendix C.1 inverse cipher, last round key 13111d7fe3944a17f307a78b4d2b30c5
    checks++;
    if (ref_last_key(key) != 128'h13111d7fe3944a17f307a78b4d2b30c5) begin
      failures++;
      $display("reference key schedule disagrees with FIPS-197");
    end
    run_block(1'b1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h13111d7fe3944a17f307a78b4d2b30c5,
              rnd128(), rnd128(), 1'b0, o0, o1);
    checks++;
    if ((o0 ^ o1) != pt) begin
      failures++;
      $display("FIPS-197 decryption: got %032x", o0 ^ o1);
    end

    for (int n = 0; n < 24; n++) begin
      if (n == 12) begin
        @(negedge clk);
        seed = rnd128();
        seed_load = 1'b1;
        @(negedge clk);
        seed_load = 1'b0;
        n_reseed++;
      end
      pt = rnd128(); key = rnd128();
      mp = (n == 0) ? '0 : rnd128();
      mk = (n == 1) ? '0 : rnd128();
      want = ref_aes(pt, key);
      run_block(1'b0, pt, key, mp, mk, n % 5 == 2, o0, o1);
      checks++;
      if ((o0 ^ o1) != want) begin
        failures++;
        $display("vector %0d: pt %032x key %032x got %032x want %032x", n, pt, key, o0 ^ o1, want);
      end
      // decrypt it again, with fresh shares, from the last round key
      mp = rnd128(); mk = rnd128();
      run_block(1'b1, want, ref_last_key(key), mp, mk, n % 7 == 3, o0, o1);
      checks++;
      if ((o0 ^ o1) != pt) begin
        failures++;
        $display("vector %0d decryption: got %032x want %032x", n, o0 ^ o1, pt);
      end
    end

    // every mechanism must have happened
    checks++;
    if (n_rfo1 != 5 * 51 || n_rfo2 != 5 * 51) begin
      failures++;
      $display("RFO1 evaluated %0d rounds, RFO2 %0d, expected %0d each", n_rfo1, n_rfo2, 5 * 51);
    end
    checks++;
    if (n_last != 51 || n_precharge != 10 * 51) begin
      failures++;
      $display("last rounds %0d, pre-charged rounds %0d", n_last, n_precharge);
    end
    checks++;
    if (n_ignored == 0 || n_refresh == 0 || n_reseed == 0 || n_switch == 0) begin
      failures++;
      $display("mechanism not exercised: ignored=%0d refresh=%0d reseed=%0d mode switches=%0d",
               n_ignored, n_refresh, n_reseed, n_switch);
    end
    $display("RFO1 rounds %0d, RFO2 rounds %0d, pre-charged idle layer %0d, last rounds %0d, ignored starts %0d, refreshes %0d, reseeds %0d, mode switches %0d",
             n_rfo1, n_rfo2, n_precharge, n_last, n_ignored, n_refresh, n_reseed, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
