// Self-checking test of ling_h4: 4-bit Ling group pseudo-carries and
// transmits at every odd bit against loop-computed group terms.
module tb_ling_h4;
  import tb_ling_ref_pkg::*;
  logic [63:0] g, p;
  logic [31:0] h4, i4;
  int checks = 0, failures = 0;

  ling_h4 dut (.g(g), .p(p), .h4(h4), .i4(i4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      rand_gp(g, p);
      if (n == 0) begin g = '0; p = '1; end
      if (n == 1) begin g = 64'h1; p = '1; end
      #1;
      for (int k = 0; k < 32; k++) begin
        int i;
        i = 2 * k + 1;
        checks++;
        if (h4[k] !== group_h(g, p, i, i - 3) || i4[k] !== group_i(p, i, i - 3)) begin
          failures++;
          if (failures < 5) $display("node %0d: h4=%b i4=%b", k, h4[k], i4[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
