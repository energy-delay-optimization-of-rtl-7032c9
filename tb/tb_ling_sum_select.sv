// Self-checking test of ling_sum_select: random dual-rail selects and
// conditional sums; bits 2k and 2k+1 follow select k, bit 64 select 32.
module tb_ling_sum_select;
  logic [32:0] sel, sel_n;
  logic [64:0] s0, s1, sum;
  int checks = 0, failures = 0;

  ling_sum_select dut (.sel(sel), .sel_n(sel_n), .s0(s0), .s1(s1), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [64:0] want;
      sel = {1'($urandom()), $urandom()};
      // mostly proper complements, sometimes both rails high (unsettled)
      sel_n = (n % 4 == 3) ? (~sel | {1'($urandom()), $urandom()}) : ~sel;
      s0 = {1'($urandom()), $urandom(), $urandom()};
      s1 = {1'($urandom()), $urandom(), $urandom()};
      #1;
      for (int k = 0; k <= 32; k++) begin
        want[2*k] = (sel[k] & s1[2*k]) | (sel_n[k] & s0[2*k]);
        if (k < 32) want[2*k+1] = (sel[k] & s1[2*k+1]) | (sel_n[k] & s0[2*k+1]);
      end
      checks++;
      if (sum !== want) begin
        failures++;
        if (failures < 5) $display("sum=%h want=%h", sum, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
