// Self-checking test of ling_h16: inputs are reference 4-bit group terms of
// random g/p; outputs must equal the 16-bit group terms.
module tb_ling_h16;
  import tb_ling_ref_pkg::*;
  logic [63:0] g, p;
  logic [31:0] h4, i4, h16, i16;
  int checks = 0, failures = 0;

  ling_h16 dut (.h4(h4), .i4(i4), .h16(h16), .i16(i16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      rand_gp(g, p);
      // directed: a lone generate at each bit under an all-propagate word
      if (n < 64) begin g = 64'h1 << n; p = '1; end
      for (int k = 0; k < 32; k++) begin
        h4[k] = group_h(g, p, 2*k+1, 2*k-2);
        i4[k] = group_i(p, 2*k+1, 2*k-2);
      end
      #1;
      for (int k = 0; k < 32; k++) begin
        int i;
        i = 2 * k + 1;
        checks++;
        if (h16[k] !== group_h(g, p, i, i - 15) || i16[k] !== group_i(p, i, i - 15)) begin
          failures++;
          if (failures < 5) $display("node %0d: h16=%b i16=%b", k, h16[k], i16[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
