// Tick-level model of a bank of domino gates (dynamic gate plus output
// inverter, with a keeper).
//
// While `eval` is 0 the stage precharges and its outputs are 0. While `eval`
// is 1 each output picks up its logic function `f` on every tick and keeps a
// 1 once it has one, so an evaluated output stays high even if the inputs
// return low: the behaviour of a discharged dynamic node held by its keeper.
// One tick of delay per stage.
//
// FOOTED = 0 models a footless gate, which has no clocked foot transistor:
// precharging while the pull-down network conducts (f = 1) is a fight between
// the precharge device and the pull-down. `contention` flags that tick.
// The domino styles come from the design; the discrete tick model is this
// implementation's own abstraction of the circuit.
module domino_node #(
  parameter int unsigned WIDTH  = 8,
  parameter bit          FOOTED = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             eval,
  input  logic [WIDTH-1:0] f,
  output logic [WIDTH-1:0] q,
  output logic             contention
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (!eval) q <= '0;
    else            q <= q | f;
  end

  assign contention = !FOOTED && !eval && (|f);

endmodule
