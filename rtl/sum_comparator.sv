// On-chip result comparator of an adder core.
//
// Once per captured result (`strobe`, one tick after the output flip-flop
// captured) it compares the 65-bit result {cout, sum} with the expected
// value scanned in for the same vector (`tag` picks exp0 or exp1).
// `mismatch` is a registered one-tick pulse per wrong result; `fail` is
// sticky until reset. Results marked not valid are ignored. Comparing against
// scanned precomputed sums follows the design; the pulse/sticky outputs are
// this design's choice.
module sum_comparator
  import ling_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    strobe,
  input  logic    valid,
  input  result_t got,
  input  logic    tag,
  input  result_t exp0,
  input  result_t exp1,
  output logic    mismatch,
  output logic    fail
);

  logic bad;
  assign bad = strobe && valid && (got != (tag ? exp1 : exp0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mismatch <= 1'b0;
      fail     <= 1'b0;
    end else begin
      mismatch <= bad;
      if (bad) fail <= 1'b1;
    end
  end

endmodule
