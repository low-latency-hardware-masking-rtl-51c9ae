// tb_lmdpl_ctrl: checks the control sequence of lmdpl_ctrl cycle by cycle
// against an expected schedule written here: the load cycle, ten round
// cycles with RFO1 on odd and RFO2 on even rounds, the AES round constants
// 01 02 04 08 10 20 40 80 1b 36, the last-round flag, mask-table generation
// one round ahead and for the right layer, done after 11 cycles, and a start
// while busy being ignored. A third run in decryption mode must hold `inv`
// high and run the round constants backwards (36 1b 80 ... 01).
module tb_lmdpl_ctrl;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, start, decrypt, inv;
  logic       load, mtg_en, mtg_sel, mtg_last, eval_en, eval_sel, last, busy, done;
  logic [3:0] mtg_round, round;
  logic [7:0] rcon;

  lmdpl_ctrl u_dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] rc_want [11] = '{8'h00, 8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  task automatic expect_bit(string what, logic got, logic want, int c);
    checks++;
    if (got !== want) begin
      failures++;
      $display("cycle %0d: %s = %b, expected %b", c, what, got, want);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; decrypt = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_bit("busy", busy, 1'b0, -1);
    expect_bit("done", done, 1'b0, -1);
    expect_bit("eval_en", eval_en, 1'b0, -1);
    for (int run = 0; run < 3; run++) begin
      start = 1'b1;
      decrypt = (run == 2);
      #1;
      expect_bit("inv in load cycle", inv, run == 2, 0);
      // cycle 0: load, tables of round 1 for RFO1
      expect_bit("load", load, 1'b1, 0);
      expect_bit("mtg_en", mtg_en, 1'b1, 0);
      expect_bit("mtg_sel", mtg_sel, 1'b0, 0);
      checks++;
      if (mtg_round != 4'd1) begin failures++; $display("mtg_round %0d in load cycle", mtg_round); end
      expect_bit("eval_en", eval_en, 1'b0, 0);
      @(negedge clk);
      start = (run == 1);   // second run holds start high: must be ignored
      decrypt = (run != 2); // mode input must not matter after the load cycle
      for (int c = 1; c <= 10; c++) begin
        #1;
        expect_bit("load", load, 1'b0, c);
        expect_bit("busy", busy, 1'b1, c);
        expect_bit("eval_en", eval_en, 1'b1, c);
        expect_bit("eval_sel", eval_sel, (c % 2) == 0, c);
        expect_bit("last", last, c == 10, c);
        expect_bit("mtg_en", mtg_en, c < 10, c);
        if (c < 10) begin
          expect_bit("mtg_sel", mtg_sel, ((c + 1) % 2) == 0, c);
          expect_bit("mtg_last", mtg_last, c == 9, c);
        end
        checks++;
        expect_bit("inv", inv, run == 2, c);
        if (round != 4'(c) || rcon != rc_want[run == 2 ? 11 - c : c]) begin
          failures++;
          $display("cycle %0d: round %0d rcon %02x, expected %0d %02x", c, round, rcon, c,
                   rc_want[run == 2 ? 11 - c : c]);
        end
        expect_bit("done", done, 1'b0, c);
        @(negedge clk);
      end
      start = 1'b0;
      #1;
      expect_bit("done", done, 1'b1, 11);
      expect_bit("busy", busy, 1'b0, 11);
      expect_bit("eval_en", eval_en, 1'b0, 11);
      @(negedge clk);
      expect_bit("done held", done, 1'b1, 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
