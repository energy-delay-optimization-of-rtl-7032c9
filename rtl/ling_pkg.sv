// Shared types and constants of the 64-bit Ling radix-4 sparse-2 adder and its
// test circuitry.
//
// The adder computes Ling pseudo-carries H only at the odd bit positions
// 1, 3, ..., 63 (32 carry nodes, "sparse-2"); the carry-in acts as the node
// below bit 0. Select index k of the sum-select stage is 0 for the carry-in
// and k+1 for the pseudo-carry at bit 2k+1; sum bit i (i = 64 is carry-out) is
// selected by index i/2. The 64-bit width and the sparse-2, radix-4 structure
// follow the design; the tick-grid timing model (TICKS per adder cycle) is
// this implementation's own choice.
package ling_pkg;

  localparam int unsigned N      = 64;          // operand width
  localparam int unsigned NODES  = N / 2;       // pseudo-carry nodes (odd bits)
  localparam int unsigned NSEL   = NODES + 1;   // selects: carry-in + nodes
  localparam int unsigned TICKS  = 16;          // ticks per adder cycle
  localparam int unsigned TICK_W = $clog2(TICKS);

  // One operand vector as applied to a core.
  typedef struct packed {
    logic [N-1:0] a;
    logic [N-1:0] b;
    logic         cin;
  } operand_t;

  localparam int unsigned OPW = $bits(operand_t);   // 129

  // Sum including carry-out in the top bit.
  typedef logic [N:0] result_t;

  // Phase clocks: 1 = evaluate, 0 = precharge.
  typedef struct packed {
    logic pc1;   // PG stage (footed)
    logic pc2;   // H4/I4 stage (footless)
    logic pc3;   // H16/I16 stage (footless)
    logic pc4;   // H64 stage (footless)
    logic psel;  // sum-select mux (footed)
  } phases_t;

  // Programmable edges of one phase on the tick grid. The phase is high from
  // tick `rise` up to, not including, tick `fall`, wrapping around the cycle.
  typedef struct packed {
    logic [TICK_W-1:0] rise;
    logic [TICK_W-1:0] fall;
  } edge_t;

  typedef struct packed {
    edge_t pc1;
    edge_t pc2;
    edge_t pc3;
    edge_t pc4;
    edge_t psel;
  } clk_cfg_t;

  localparam int unsigned CFGW = $bits(clk_cfg_t);  // 40

  // Default edges: every footless stage enters evaluation before its first
  // input rises and precharges only after its inputs have fallen; psel rises
  // once H64 has settled and stays high through the pc1 capture edge.
  localparam clk_cfg_t CLK_CFG_DEFAULT = '{
    pc1:  '{rise: 4'd0,  fall: 4'd13},
    pc2:  '{rise: 4'd1,  fall: 4'd14},
    pc3:  '{rise: 4'd2,  fall: 4'd15},
    pc4:  '{rise: 4'd3,  fall: 4'd1},
    psel: '{rise: 4'd4,  fall: 4'd1}
  };

  // Scan image of one core: its two input vectors, then its two expected results.
  localparam int unsigned IN_SCANW  = 2 * OPW;          // 258
  localparam int unsigned EXP_SCANW = 2 * (N + 1);      // 130

endpackage
