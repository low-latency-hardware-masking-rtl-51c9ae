// tb_lmdpl_sbox: self-checking test of one masked S-box, mask-table
// generator (lmdpl_sbox_mtg) and operation layer (lmdpl_sbox_op) together.
// For every input byte, several random mask shares and random bits are
// applied; the recombined output y.t ^ m_out must equal the AES S-box value,
// computed here from the field definition (brute-force inverse modulo
// x^8+x^4+x^3+x+1 plus the affine map). The rails must be complementary
// while evaluating, and an all-zero (pre-charged) input must give an
// all-zero output whatever the table holds.
module tb_lmdpl_sbox;
  import lmdpl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]            m_in, m_out;
  logic [SBOX_RND_W-1:0] r;
  logic [SBOX_TBL_W-1:0] t;
  dr8_t                  x, y;
  logic                  inv;

  lmdpl_sbox_mtg u_mtg (.m_in(m_in), .inv(inv), .r(r), .m_out(m_out), .t(t));
  lmdpl_sbox_op  u_op  (.x(x), .inv(inv), .t(t), .y(y));

  int checks = 0, failures = 0;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] v);
    logic [7:0] iv = 8'h00, s;
    for (int c = 1; c < 256; c++) if (gmul(v, 8'(c)) == 8'h01) iv = 8'(c);
    for (int j = 0; j < 8; j++)
      s[j] = iv[j] ^ iv[(j+4)%8] ^ iv[(j+5)%8] ^ iv[(j+6)%8] ^ iv[(j+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [SBOX_RND_W-1:0] rnd36();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, s;
    // known values from the AES standard
    if (ref_sbox(8'h00) != 8'h63 || ref_sbox(8'h53) != 8'hed) begin
      failures++;
      $display("reference model wrong");
    end
    for (int i = 0; i < 512; i++) begin
      inv = (i >= 256);
      // forward: v -> S(v); inverse: S(v) -> v
      s = ref_sbox(8'(i));
      v = inv ? s : 8'(i);
      if (inv) s = 8'(i);
      for (int k = 0; k < 4; k++) begin
        m_in = (k == 0) ? 8'h00 : 8'($urandom());
        r    = (k == 1) ? '0 : rnd36();
        x    = to_dr8(v ^ m_in);
        @(posedge clk);
        checks++;
        if ((y.t ^ m_out) != s || y.f != ~y.t) begin
          failures++;
          if (failures < 10)
            $display("inv=%0d S(%02x) m_in=%02x: got %02x (t=%02x f=%02x m=%02x), want %02x",
                     inv, v, m_in, y.t ^ m_out, y.t, y.f, m_out, s);
        end
        // pre-charge phase: operation share all zero, table unchanged
        x = '0;
        @(posedge clk);
        checks++;
        if (y != '0) begin
          failures++;
          $display("pre-charge not propagated for table of %02x: %04x", v, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
