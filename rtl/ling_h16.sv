// Second carry-tree stage (H16/I16) of the radix-4 sparse-2 Ling tree.
//
// Kogge-Stone radix-4 merge of four 4-bit groups whose top bits are 4 apart
// (node k with nodes k-2, k-4, k-6):
//   H16 = H4_k + I4_k (H4_{k-2} + I4_{k-2} (H4_{k-4} + I4_{k-4} H4_{k-6}))
//   I16 = I4_k I4_{k-2} I4_{k-4} I4_{k-6}
// Nodes below 0 count as H = I = 0. Combinational; in the core it is a
// footless domino stage on phase pc3. The stage, its radix and its lateral
// fanout of 1 follow the design; the merge equations are this design's
// reading, as the gate equations of this stage are not given.
module ling_h16
  import ling_pkg::*;
(
  input  logic [NODES-1:0] h4,
  input  logic [NODES-1:0] i4,
  output logic [NODES-1:0] h16,
  output logic [NODES-1:0] i16
);

  logic [NODES+5:0] hx, ix;   // six zero nodes below node 0
  assign hx = {h4, 6'b0};
  assign ix = {i4, 6'b0};

  always_comb begin
    for (int k = 0; k < NODES; k++) begin
      h16[k] = hx[k+6] | (ix[k+6] & (hx[k+4] | (ix[k+4] & (hx[k+2] | (ix[k+2] & hx[k])))));
      i16[k] = ix[k+6] & ix[k+4] & ix[k+2] & ix[k];
    end
  end

endmodule
