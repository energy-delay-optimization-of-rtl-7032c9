// Sum-select multiplexer of the sparse-2 Ling adder.
//
// Each select index k drives two result bits, 2k and 2k+1 (index 32 drives
// only the carry-out, bit 64): result = sel & S1 | sel_n & S0. The select is
// dual-rail, as a domino mux sees it: sel is the pseudo-carry and sel_n its
// complement (H64 and H64'), with sel[0] = carry-in. When both rails are
// high (complement not yet settled) the output is S0 | S1, which is what makes
// the evaluation edge of this stage timing-critical. Combinational; in the
// core it is a footed domino stage on phase psel. The dual-rail select and
// two sums per pseudo-carry follow the design; the AND-OR form is this
// design's choice.
module ling_sum_select
  import ling_pkg::*;
(
  input  logic [NSEL-1:0] sel,
  input  logic [NSEL-1:0] sel_n,
  input  result_t         s0,
  input  result_t         s1,
  output result_t         sum
);

  always_comb begin
    for (int i = 0; i <= N; i++)
      sum[i] = (sel[i/2] & s1[i]) | (sel_n[i/2] & s0[i]);
  end

endmodule
