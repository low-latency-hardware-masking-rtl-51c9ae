// lmdpl_and_mtg: mask-table generator half of one LMDPL AND gadget.
//
// The gadget computes x = a & b on shared values a = a_m ^ a_o, b = b_m ^ b_o.
// This half sees only the mask shares a_m, b_m and one fresh random bit r,
// which becomes the mask share of the result (x_m = r). It builds the table
// t that the operation half (lmdpl_and_op) indexes with the dual rails of
// a_o and b_o. For k = {alpha, beta} in 0..3, gate k+4 fires when a_o = alpha
// and b_o = beta and must then output the result operation share
//   t[k+4] = ((alpha ^ a_m) & (beta ^ b_m)) ^ r,
// while gate k drives the false rail: t[k] = ~t[k+4].
// The split into two layers and the table of eight bits t^7..t^0 follow the
// document's gadget figure; which rail combination feeds which of the eight
// gates is this design's own numbering.
//
// Purely combinational. In the full design the table is registered before
// the operation layer uses it.
module lmdpl_and_mtg (
  input  logic       a_m,
  input  logic       b_m,
  input  logic       r,
  output logic [7:0] t
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      t[k+4] = ((k[1] ^ a_m) & (k[0] ^ b_m)) ^ r;
      t[k]   = ~t[k+4];
    end
  end
endmodule
