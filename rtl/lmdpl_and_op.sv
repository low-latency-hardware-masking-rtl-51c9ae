// lmdpl_and_op: operation-layer half of one LMDPL AND gadget.
//
// Inputs are the dual-rail operation shares of a and b, given as {true,
// false}, and the registered 8-bit table from lmdpl_and_mtg. Eight
// three-input AND gates s^j = t^j & a-rail & b-rail are followed by two
// four-input ORs: x.true = |s[7:4], x.false = |s[3:0]. Gate j (and j+4)
// takes the a_o true rail when bit 1 of (j mod 4) is set, else the false
// rail, and likewise the b_o rail from bit 0.
// Only monotonic gates are used, so with both operands pre-charged (both
// rails 0) the output is pre-charged too, and during evaluation exactly one
// of the eight AND gates can rise: the output toggles at most once.
// The gate structure (eight ANDs into two ORs) is the document's; the
// assignment of rail pairs to gates is this design's.
//
// Purely combinational.
module lmdpl_and_op (
  input  logic [1:0] a,  // {true, false}
  input  logic [1:0] b,  // {true, false}
  input  logic [7:0] t,
  output logic [1:0] x   // {true, false}
);
  logic [7:0] s;

  always_comb begin
    for (int j = 0; j < 8; j++) begin
      s[j] = t[j] & ((j & 2) != 0 ? a[1] : a[0]) & ((j & 1) != 0 ? b[1] : b[0]);
    end
    x = {|s[7:4], |s[3:0]};
  end
endmodule
