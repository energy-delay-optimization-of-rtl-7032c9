// Self-checking test of ling_pg: random and corner operands against a
// bitwise reference, with the bit-0 generate equal to the carry out of bit 0.
module tb_ling_pg;
  import tb_ling_ref_pkg::*;
  logic [63:0] a, b, g, p;
  logic cin;
  int checks = 0, failures = 0;

  ling_pg dut (.a(a), .b(b), .cin(cin), .g(g), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [64:0] c;
    for (int n = 0; n < 2000; n++) begin
      a = rand64(); b = rand64(); cin = 1'($urandom());
      if (n == 0) begin a = '0; b = '0; cin = 1; end
      if (n == 1) begin a = 64'h1; b = '0; cin = 1; end
      #1;
      c = ripple_carries(a, b, cin);
      for (int i = 0; i < 64; i++) begin
        logic ge;
        ge = (i == 0) ? c[1] : (a[i] & b[i]);
        checks++;
        if (g[i] !== ge || p[i] !== (a[i] | b[i])) begin
          failures++;
          if (failures < 5) $display("bit %0d: g=%b exp %b p=%b", i, g[i], ge, p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
