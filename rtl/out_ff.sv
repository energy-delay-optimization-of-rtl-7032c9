// Output flip-flop of an adder core, clocked by the rising edge of pc1.
//
// On the tick where pc1 goes from 0 to 1 (start of the next adder cycle) it
// captures the sum-select output, together with the tag of the vector that
// produced it and a valid bit; it holds them for the rest of the cycle. pc1
// rising is detected against a registered copy of pc1, all on the tick
// clock. Capturing on pc1 follows the design; the tag and valid bits are this
// design's bookkeeping for the comparator.
module out_ff
  import ling_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    pc1,
  input  result_t d,
  input  logic    tag_in,
  input  logic    valid_in,
  output result_t q,
  output logic    tag,
  output logic    valid,
  output logic    capture
);

  logic pc1_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc1_d <= 1'b0;
    else        pc1_d <= pc1;
  end

  assign capture = pc1 && !pc1_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      tag   <= 1'b0;
      valid <= 1'b0;
    end else if (capture) begin
      q     <= d;
      tag   <= tag_in;
      valid <= valid_in;
    end
  end

endmodule
