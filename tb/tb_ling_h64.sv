// Self-checking test of ling_h64: inputs are reference 16-bit group terms of
// random g/p; outputs must equal the full pseudo-carries H_{i:0}.
module tb_ling_h64;
  import tb_ling_ref_pkg::*;
  logic [63:0] g, p;
  logic [31:0] h16, i16, h64;
  int checks = 0, failures = 0;

  ling_h64 dut (.h16(h16), .i16(i16), .h64(h64));

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
        h16[k] = group_h(g, p, 2*k+1, 2*k-14);
        i16[k] = group_i(p, 2*k+1, 2*k-14);
      end
      #1;
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (h64[k] !== group_h(g, p, 2*k+1, 0)) begin
          failures++;
          if (failures < 5) $display("node %0d: h64=%b", k, h64[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
