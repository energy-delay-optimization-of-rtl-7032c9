// One adder core with its at-speed test circuitry.
//
// Scan chain (two operand vectors) -> operand mux -> Ling adder core ->
// output flip-flop (pc1) -> comparator against the scanned expected sums.
// The core's scan segment is the input-vector chain followed by the
// expected-sum chain; seen as one register, its image is {in_q, exp_q} with
// in_q = {vec1, vec0} and exp_q = {exp1, exp0}, exp = {cout, sum}.
//
// Operation: with `scan_en` high the chain shifts one bit per tick. With
// `run` high the mux alternates vec0/vec1 every adder cycle; each result is
// captured at the next rising pc1 and compared one tick later. A cycle's
// result is compared only if the whole cycle ran with `run` high and
// `scan_en` low. `out` pulses for each wrong result, `fail` is sticky, and
// `contention` is sticky once any footless stage precharged against a
// conducting pull-down while running (not while the clock settings shift).
// The block structure follows the design; the result tagging is this
// design's choice. The design's output buffer between the
// flip-flop and comparator has no logic function and is a plain wire here.
module adder_test_slice
  import ling_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  phases_t ph,
  input  logic    cycle_end,
  input  logic    scan_en,
  input  logic    scan_in,
  output logic    scan_out,
  input  logic    run,
  output logic    out,
  output logic    fail,
  output logic    contention,
  output result_t result
);

  // Scan segments.
  logic [IN_SCANW-1:0]  in_q;
  logic [EXP_SCANW-1:0] exp_q;
  logic                 mid_so;

  scan_chain #(.WIDTH(IN_SCANW)) u_in_chain (
    .clk(clk), .rst_n(rst_n), .shift_en(scan_en), .si(scan_in), .so(mid_so), .q(in_q));
  scan_chain #(.WIDTH(EXP_SCANW)) u_exp_chain (
    .clk(clk), .rst_n(rst_n), .shift_en(scan_en), .si(mid_so), .so(scan_out), .q(exp_q));

  operand_t vec0, vec1, vec;
  result_t  exp0, exp1;
  assign vec0 = in_q[OPW-1:0];
  assign vec1 = in_q[2*OPW-1:OPW];
  assign exp0 = exp_q[N:0];
  assign exp1 = exp_q[2*N+1:N+1];

  // Operand mux.
  logic sel;
  operand_mux u_mux (
    .clk(clk), .rst_n(rst_n), .run(run), .cycle_end(cycle_end),
    .vec0(vec0), .vec1(vec1), .vec(vec), .sel(sel));

  // Per-cycle bookkeeping: which vector ran, and whether the cycle was clean.
  logic dirty, tag_d, valid_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dirty   <= 1'b1;
      tag_d   <= 1'b0;
      valid_d <= 1'b0;
    end else if (cycle_end) begin
      tag_d   <= sel;
      valid_d <= run && !dirty && !scan_en;
      dirty   <= 1'b0;
    end else if (scan_en || !run) begin
      dirty   <= 1'b1;
    end
  end

  // Adder core.
  logic [N-1:0] sum;
  logic         cout, cont;
  ling_adder64 u_core (
    .clk(clk), .rst_n(rst_n), .ph(ph), .a(vec.a), .b(vec.b), .cin(vec.cin),
    .sum(sum), .cout(cout), .contention(cont));

  // Output flip-flop on pc1.
  logic ff_tag, ff_valid, capture, strobe;
  out_ff u_out_ff (
    .clk(clk), .rst_n(rst_n), .pc1(ph.pc1), .d({cout, sum}), .tag_in(tag_d),
    .valid_in(valid_d), .q(result), .tag(ff_tag), .valid(ff_valid), .capture(capture));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) strobe <= 1'b0;
    else        strobe <= capture;
  end

  // Comparator (the buffer in front of it is a wire).
  sum_comparator u_cmp (
    .clk(clk), .rst_n(rst_n), .strobe(strobe), .valid(ff_valid), .got(result),
    .tag(ff_tag), .exp0(exp0), .exp1(exp1), .mismatch(out), .fail(fail));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    contention <= 1'b0;
    else if (cont && run && !scan_en) contention <= 1'b1;
  end

endmodule
