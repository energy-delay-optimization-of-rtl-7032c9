// 64-bit Ling carry-lookahead adder core: radix-4 Kogge-Stone carry tree,
// sparse-2, domino logic, with a static sum-precompute block.
//
// Datapath: PG (g, p with the carry-in folded into bit 0) -> H4/I4 -> H16/I16
// -> H64 gives the Ling pseudo-carry at bits 1, 3, ..., 63. In parallel the
// static block precomputes S0/S1 for every bit. The sum-select mux picks S1
// or S0 per bit with the dual-rail pseudo-carry (carry-in for bits 0 and 1,
// H_{2k+1} for bits 2k+2 and 2k+3, H_63 for carry-out).
//
// Timing: each domino stage is a domino_node bank clocked by the tick clock
// `clk` and enabled by its phase: PG on pc1 (footed), H4 on pc2, H16 on pc3,
// H64 on pc4 (footless), sum select on psel (footed). H64' is the dynamic
// node, the complement of H64, which is high during precharge and until H64
// evaluates; psel must therefore rise only once H64 has settled, or S0 is
// wrongly selected. With every stage one tick, sum/cout are valid 5 ticks
// after pc1 rises with stable a/b/cin, provided the phases overlap in order,
// and stay valid until psel precharges. `contention` is high on any tick a
// footless stage precharges while its pull-down conducts.
// The architecture, stage split, domino styles and phase names follow the
// design; the tick abstraction is this implementation's.
module ling_adder64
  import ling_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  phases_t      ph,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         contention
);

  // Stage 1: PG, footed, pc1.
  logic [N-1:0] g_f, p_f, g_q, p_q;
  logic         c_pg;
  ling_pg u_pg (.a(a), .b(b), .cin(cin), .g(g_f), .p(p_f));
  domino_node #(.WIDTH(2*N), .FOOTED(1'b1)) u_pg_dn (
    .clk(clk), .rst_n(rst_n), .eval(ph.pc1), .f({g_f, p_f}), .q({g_q, p_q}),
    .contention(c_pg));

  // Stage 2: H4/I4, footless, pc2.
  logic [NODES-1:0] h4_f, i4_f, h4_q, i4_q;
  logic             c_h4;
  ling_h4 u_h4 (.g(g_q), .p(p_q), .h4(h4_f), .i4(i4_f));
  domino_node #(.WIDTH(2*NODES), .FOOTED(1'b0)) u_h4_dn (
    .clk(clk), .rst_n(rst_n), .eval(ph.pc2), .f({h4_f, i4_f}), .q({h4_q, i4_q}),
    .contention(c_h4));

  // Stage 3: H16/I16, footless, pc3.
  logic [NODES-1:0] h16_f, i16_f, h16_q, i16_q;
  logic             c_h16;
  ling_h16 u_h16 (.h4(h4_q), .i4(i4_q), .h16(h16_f), .i16(i16_f));
  domino_node #(.WIDTH(2*NODES), .FOOTED(1'b0)) u_h16_dn (
    .clk(clk), .rst_n(rst_n), .eval(ph.pc3), .f({h16_f, i16_f}), .q({h16_q, i16_q}),
    .contention(c_h16));

  // Stage 4: H64, footless, pc4.
  logic [NODES-1:0] h64_f, h64_q;
  logic             c_h64;
  ling_h64 u_h64 (.h16(h16_q), .i16(i16_q), .h64(h64_f));
  domino_node #(.WIDTH(NODES), .FOOTED(1'b0)) u_h64_dn (
    .clk(clk), .rst_n(rst_n), .eval(ph.pc4), .f(h64_f), .q(h64_q),
    .contention(c_h64));

  // Static conditional sums.
  result_t s0, s1;
  ling_sum_precompute u_pre (.a(a), .b(b), .s0(s0), .s1(s1));

  // Stage 5: sum select, footed, psel. Dual rail: H64 and the dynamic node H64'.
  result_t sum_f, sum_q;
  logic    c_sel;
  ling_sum_select u_sel (
    .sel({h64_q, cin}), .sel_n({~h64_q, ~cin}), .s0(s0), .s1(s1), .sum(sum_f));
  domino_node #(.WIDTH(N+1), .FOOTED(1'b1)) u_sel_dn (
    .clk(clk), .rst_n(rst_n), .eval(ph.psel), .f(sum_f), .q(sum_q),
    .contention(c_sel));

  assign sum        = sum_q[N-1:0];
  assign cout       = sum_q[N];
  assign contention = c_pg | c_h4 | c_h16 | c_h64 | c_sel;

endmodule
