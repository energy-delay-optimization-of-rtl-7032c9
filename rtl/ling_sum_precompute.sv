// Static sum-precompute block of the sparse-2 Ling adder.
//
// For every sum bit it forms the two conditional sums S0/S1, chosen later by
// the pseudo-carry H that selects that bit (t = a ^ b):
//   bit 0        (selected by cin):  S0 = t0,            S1 = ~t0
//   even bit i   (selected by H_{i-1}): S0 = t_i,        S1 = t_i ^ p_{i-1}
//   odd bit i    (selected by H_{i-2}, or cin for i = 1):
//                S0 = t_i ^ g_{i-1}, S1 = t_i ^ (g_{i-1} + p_{i-1} p_{i-2})
//   bit 64, cout (selected by H_63): S0 = 0,            S1 = p_63
// Here g and p are the plain a&b, a|b, and p_{-1} = 1. The odd-bit form
// unrolls the carry recursion once, since the carry into bit i is
// g_{i-1} + p_{i-1} p_{i-2} H_{i-2}. Combinational static logic, off the
// critical path. The equations follow the design's conditional-sum
// formulation; which bit parity carries H is this design's choice.
module ling_sum_precompute
  import ling_pkg::*;
(
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output result_t      s0,
  output result_t      s1
);

  logic [N-1:0] t, g, p;
  assign t = a ^ b;
  assign g = a & b;
  assign p = a | b;

  always_comb begin
    s0[0] = t[0];
    s1[0] = ~t[0];
    s0[1] = t[1] ^ g[0];
    s1[1] = t[1] ^ (g[0] | p[0]);
    for (int i = 2; i < N; i++) begin
      if (i % 2 == 0) begin
        s0[i] = t[i];
        s1[i] = t[i] ^ p[i-1];
      end else begin
        s0[i] = t[i] ^ g[i-1];
        s1[i] = t[i] ^ (g[i-1] | (p[i-1] & p[i-2]));
      end
    end
    s0[N] = 1'b0;
    s1[N] = p[N-1];
  end

endmodule
