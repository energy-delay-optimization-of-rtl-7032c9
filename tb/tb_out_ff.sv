// Self-checking test of out_ff: it must capture data, tag and valid exactly
// on the tick at which pc1 rises, and hold them otherwise.
module tb_out_ff;
  import ling_pkg::*;
  logic clk = 0, rst_n = 0, pc1 = 0, tag_in = 0, valid_in = 0, tag, valid, capture;
  result_t d, q;
  int checks = 0, failures = 0;

  out_ff dut (.clk(clk), .rst_n(rst_n), .pc1(pc1), .d(d), .tag_in(tag_in),
              .valid_in(valid_in), .q(q), .tag(tag), .valid(valid), .capture(capture));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    result_t eq;
    logic et, ev, prev;
    eq = '0; et = 0; ev = 0; prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      pc1 = ($urandom() % 3) != 0;
      d = {1'($urandom()), $urandom(), $urandom()};
      tag_in = 1'($urandom());
      valid_in = 1'($urandom());
      #1;
      checks++;
      if (capture !== (pc1 && !prev)) failures++;
      @(negedge clk);
      if (pc1 && !prev) begin eq = d; et = tag_in; ev = valid_in; end
      prev = pc1;
      checks++;
      if (q !== eq || tag !== et || valid !== ev) begin
        failures++;
        if (failures < 5) $display("n=%0d q=%h exp=%h", n, q, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
