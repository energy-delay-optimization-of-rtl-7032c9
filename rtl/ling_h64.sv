// Last carry-tree stage (H64) of the radix-4 sparse-2 Ling tree.
//
// Merges four 16-bit groups whose top bits are 16 apart (node k with nodes
// k-8, k-16, k-24) into the full pseudo-carry H_{i:0} at bit i = 2k+1:
//   H64 = H16_k + I16_k (H16_{k-8} + I16_{k-8} (H16_{k-16} + I16_{k-16} H16_{k-24}))
// Every group now reaches bit 0, so no transmit term is produced.
// Combinational; in the core it is a footless domino stage on phase pc4.
// The stage follows the design; its merge equations are this design's
// reading, as they are not given.
module ling_h64
  import ling_pkg::*;
(
  input  logic [NODES-1:0] h16,
  input  logic [NODES-1:0] i16,
  output logic [NODES-1:0] h64
);

  logic [NODES+23:0] hx, ix;  // 24 zero nodes below node 0
  assign hx = {h16, 24'b0};
  assign ix = {i16, 24'b0};

  always_comb begin
    for (int k = 0; k < NODES; k++)
      h64[k] = hx[k+24] | (ix[k+24] & (hx[k+16] | (ix[k+16] & (hx[k+8] | (ix[k+8] & hx[k])))));
  end

endmodule
