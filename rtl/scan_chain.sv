// Scan chain segment: a serial shift register with parallel outputs.
//
// While `shift_en` is high, every clock moves the contents one place toward
// bit 0: q <= {si, q[WIDTH-1:1]}, and `so` = q[0] feeds the next segment. So
// after WIDTH shifts the first bit shifted in sits in q[0]. Reset loads
// RESET_VAL. Segments are chained so/si to form the test chip's scan chain,
// which holds the operand vectors, the expected sums and the clock edge
// settings. The shift direction and reset value are this design's choices.
module scan_chain #(
  parameter int unsigned           WIDTH     = 8,
  parameter logic [WIDTH-1:0]      RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             si,
  output logic             so,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= RESET_VAL;
    else if (shift_en) q <= {si, q[WIDTH-1:1]};
  end

  assign so = q[0];

endmodule
