// First carry-tree stage (H4/I4) of the radix-4 sparse-2 Ling tree.
//
// At every odd bit i = 2k+1 it forms the 4-bit Ling pseudo-carry and transmit
// group terms over bits i..i-3:
//   H4 = g_i + g_{i-1} + p_{i-1} g_{i-2} + p_{i-1} p_{i-2} g_{i-3}
//   I4 = p_{i-1} p_{i-2} p_{i-3} p_{i-4}
// The H4 form is Ling's reduced 4-bit pseudo-carry, one factor shorter per
// term than the matching generate. Bits below 0 count as g = p = 0 (so groups
// that reach bit 0 have I = 0). Combinational; in the core it is a footless
// domino stage on phase pc2. The I term as a product of shifted propagates is
// this design's reading of the transmit signal.
module ling_h4
  import ling_pkg::*;
(
  input  logic [N-1:0]     g,
  input  logic [N-1:0]     p,
  output logic [NODES-1:0] h4,
  output logic [NODES-1:0] i4
);

  // Inputs padded with four zero bits below bit 0.
  logic [N+3:0] gx, px;
  assign gx = {g, 4'b0};
  assign px = {p, 4'b0};

  always_comb begin
    for (int k = 0; k < NODES; k++) begin
      // bit i = 2k+1 sits at padded index i+4
      h4[k] = gx[2*k+5] | gx[2*k+4] | (px[2*k+4] & gx[2*k+3])
            | (px[2*k+4] & px[2*k+3] & gx[2*k+2]);
      i4[k] = px[2*k+4] & px[2*k+3] & px[2*k+2] & px[2*k+1];
    end
  end

endmodule
