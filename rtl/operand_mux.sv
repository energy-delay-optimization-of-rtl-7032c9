// Operand multiplexer in front of an adder core.
//
// Selects one of the two scanned operand vectors. While `run` is high the
// select flips at every cycle boundary (on the tick where `cycle_end` is
// high), so the core sees a fresh input transition each cycle; while `run`
// is low it holds vector 0. The output is combinational from the select
// register, so the applied vector changes exactly at the cycle boundary,
// before pc1 evaluates; an assertion checks that the select never changes
// inside a cycle. `sel` tells which vector is applied. Two scanned
// inputs feeding a mux follow the design; the alternating select is this
// design's choice.
module operand_mux
  import ling_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     run,
  input  logic     cycle_end,
  input  operand_t vec0,
  input  operand_t vec1,
  output operand_t vec,
  output logic     sel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 sel <= 1'b0;
    else if (cycle_end && run)  sel <= ~sel;
    else if (cycle_end)         sel <= 1'b0;
  end

  assign vec = sel ? vec1 : vec0;

  // The footed PG stage needs stable inputs while it evaluates: the select
  // may only change at a cycle boundary.
  a_sel_at_boundary: assert property (
    @(posedge clk) disable iff (!rst_n) !cycle_end |=> $stable(sel));

endmodule
