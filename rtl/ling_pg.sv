// Generate/propagate stage ("G/T" gates) of the Ling adder.
//
// Per bit: g = a & b, p = a | b (p is the transmit signal of the Ling carry
// tree). The carry-in is merged into bit 0: g[0] = a0 b0 + (a0 + b0) cin, the
// carry out of bit 0. That keeps p[0] g[0] = g[0], which the reduced Ling
// equations of the next stage rely on. Purely combinational; in the core it
// is the first domino stage (footed, phase pc1). Equations follow the adder's
// generate/propagate definition; folding the carry-in into bit 0 is this
// design's choice.
module ling_pg
  import ling_pkg::*;
(
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] g,
  output logic [N-1:0] p
);

  always_comb begin
    p = a | b;
    g = a & b;
    g[0] = (a[0] & b[0]) | ((a[0] | b[0]) & cin);
  end

endmodule
