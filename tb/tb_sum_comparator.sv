// Self-checking test of sum_comparator: a mismatch pulse one tick after a
// strobed valid result differs from the expected value picked by its tag,
// nothing for matches, invalid results or ticks without strobe, and a fail
// flag that stays set.
module tb_sum_comparator;
  import ling_pkg::*;
  logic clk = 0, rst_n = 0, strobe = 0, valid = 0, tag = 0, mismatch, fail;
  result_t got, exp0, exp1;
  int checks = 0, failures = 0;

  sum_comparator dut (.clk(clk), .rst_n(rst_n), .strobe(strobe), .valid(valid),
                      .got(got), .tag(tag), .exp0(exp0), .exp1(exp1),
                      .mismatch(mismatch), .fail(fail));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ebad, efail;
    efail = 0;
    exp0 = {1'($urandom()), $urandom(), $urandom()};
    exp1 = {1'($urandom()), $urandom(), $urandom()};
    got = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      strobe = 1'($urandom());
      valid = ($urandom() % 4) != 0;
      tag = 1'($urandom());
      got = tag ? exp1 : exp0;
      // only late in the run: flip one random bit
      if (n > 600 && ($urandom() % 3 == 0)) got[$urandom() % 65] ^= 1'b1;
      ebad = strobe && valid && (got != (tag ? exp1 : exp0));
      @(negedge clk);
      if (ebad) efail = 1;
      checks++;
      if (mismatch !== ebad || fail !== efail) begin
        failures++;
        if (failures < 5) $display("n=%0d mismatch=%b exp=%b fail=%b", n, mismatch, ebad, fail);
      end
    end
    checks++;
    if (!fail) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
