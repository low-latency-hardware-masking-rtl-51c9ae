// tb_lmdpl_and: exhaustive test of one LMDPL AND gadget, table generator
// (lmdpl_and_mtg) and operation layer (lmdpl_and_op) together. For all 64
// combinations of the mask shares, operation shares and random bit, the
// recombined output x.t ^ r must equal (a_m^a_o) & (b_m^b_o), the rails
// must be complementary, the table must be the one the table rule gives,
// and pre-charged operands (one or both) must give a pre-charged output.
module tb_lmdpl_and;
  logic       a_m, b_m, r;
  logic [1:0] a, b, x;
  logic [7:0] t;

  lmdpl_and_mtg u_mtg (.a_m(a_m), .b_m(b_m), .r(r), .t(t));
  lmdpl_and_op  u_op  (.a(a), .b(b), .t(t), .x(x));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic want;
    logic [7:0] twant;
    for (int i = 0; i < 64; i++) begin
      {a_m, b_m, r} = 3'(i);
      a = {i[3], ~i[3]};
      b = {i[4], ~i[4]};
      #1;
      want = (a_m ^ i[3]) & (b_m ^ i[4]);
      checks++;
      if ((x[1] ^ r) != want || x[0] != ~x[1]) begin
        failures++;
        $display("a_m=%b b_m=%b r=%b a_o=%b b_o=%b: x=%b want %b", a_m, b_m, r, i[3], i[4], x, want);
      end
      // table rule: entry k+4 is the result share for a_o=k[1], b_o=k[0]
      for (int k = 0; k < 4; k++) begin
        twant[k+4] = ((k[1] ^ a_m) & (k[0] ^ b_m)) ^ r;
        twant[k]   = ~twant[k+4];
      end
      checks++;
      if (t != twant) begin
        failures++;
        $display("table %b, want %b", t, twant);
      end
      // pre-charge: both rails of an operand low
      a = 2'b00;
      #1;
      checks++;
      if (x != 2'b00) begin
        failures++;
        $display("pre-charge of a not propagated: x=%b", x);
      end
      b = 2'b00;
      #1;
      checks++;
      if (x != 2'b00) begin
        failures++;
        $display("pre-charge of a,b not propagated: x=%b", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
