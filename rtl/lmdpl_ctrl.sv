// lmdpl_ctrl: round and phase control of the low-latency masked AES.
//
// One AES round is evaluated per cycle, alternately by the two operation
// layers: RFO1 evaluates the odd rounds and RFO2 the even rounds, and the
// layer that does not evaluate is pre-charged. The mask-table generators
// work one round ahead: in the cycle in which round n is evaluated they
// prepare the tables and masks of round n+1, and they prepare round 1 in
// the load cycle itself.
// Timing: `start` is accepted when not busy (the load cycle, `load` = 1).
// Rounds 1..NR are evaluated in the next NR cycles (eval_en = 1, `round`
// = n). `done` rises the cycle after round NR and stays high until the next
// start, so the result is there NR+1 cycles after the start cycle.
// `decrypt` is sampled in the load cycle and held in `inv` for the whole
// block; in decryption the round constants run backwards (round n uses
// Rcon[NR+1-n]) because the key schedule is walked from the last round key.
// The alternation of RFO1/RFO2 follows the document; the encoding of these
// control signals is this design's.
module lmdpl_ctrl
  import lmdpl_pkg::*;
#(
  parameter int unsigned NR = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       decrypt,
  output logic       inv,
  output logic       load,
  output logic       mtg_en,
  output logic [3:0] mtg_round,
  output logic       mtg_sel,    // table register written: 0 = RFO1, 1 = RFO2
  output logic       mtg_last,
  output logic       eval_en,
  output logic       eval_sel,   // 0 = RFO1 evaluates, 1 = RFO2 evaluates
  output logic [3:0] round,
  output logic [7:0] rcon,
  output logic       last,
  output logic       busy,
  output logic       done
);
  typedef enum logic {IDLE, RUN} state_e;
  state_e state;
  logic [3:0] rnd_q;
  logic       dec_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      rnd_q <= '0;
      dec_q <= 1'b0;
      done  <= 1'b0;
    end else if (load) begin
      state <= RUN;
      dec_q <= decrypt;
      rnd_q <= 4'd1;
      done  <= 1'b0;
    end else if (state == RUN) begin
      if (rnd_q == 4'(NR)) begin
        state <= IDLE;
        done  <= 1'b1;
      end
      rnd_q <= rnd_q + 4'd1;
    end
  end

  always_comb begin
    busy      = (state == RUN);
    load      = start && !busy;
    eval_en   = busy;
    round     = busy ? rnd_q : 4'd0;
    eval_sel  = ~rnd_q[0];
    last      = busy && (rnd_q == 4'(NR));
    inv       = load ? decrypt : dec_q;
    rcon      = dec_q ? aes_rcon(32'(NR + 1) - 32'(rnd_q)) : aes_rcon(32'(rnd_q));
    mtg_en    = load || (busy && rnd_q != 4'(NR));
    mtg_round = load ? 4'd1 : rnd_q + 4'd1;
    mtg_sel   = ~mtg_round[0];
    mtg_last  = (mtg_round == 4'(NR));
  end

  // RFO1 always takes the odd rounds, RFO2 the even ones
  a_alternate: assert property (@(posedge clk) disable iff (!rst_n)
    eval_en && !last |=> eval_en && (eval_sel != $past(eval_sel)));
  // tables are always prepared for the layer that evaluates next
  a_tables: assert property (@(posedge clk) disable iff (!rst_n)
    mtg_en |=> eval_en && (eval_sel == $past(mtg_sel)));
endmodule
