// Self-checking test of ling_sum_precompute: selecting each bit's S0/S1 with
// the reference pseudo-carry that the sparse tree provides for it (carry-in
// for bits 0 and 1, H_{i-1} for even bits, H_{i-2} for odd bits, H_63 for
// carry-out) must give {cout, sum} of a + b + cin.
module tb_ling_sum_precompute;
  import tb_ling_ref_pkg::*;
  logic [63:0] a, b;
  logic cin;
  logic [64:0] s0, s1;
  int checks = 0, failures = 0;

  ling_sum_precompute dut (.a(a), .b(b), .s0(s0), .s1(s1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [64:0] want, got;
      a = rand64(); b = rand64(); cin = 1'($urandom());
      if (n == 0) begin a = '1; b = '0; cin = 1; end
      if (n == 1) begin a = '1; b = '1; cin = 1; end
      #1;
      want = {1'b0, a} + {1'b0, b} + 65'(cin);
      for (int i = 0; i <= 64; i++) begin
        logic h;
        if (i < 2)       h = cin;
        else if (i % 2)  h = ling_h(a, b, cin, i - 2);
        else             h = ling_h(a, b, cin, i - 1);
        got[i] = h ? s1[i] : s0[i];
      end
      checks++;
      if (got !== want) begin
        failures++;
        if (failures < 5) $display("a=%h b=%h cin=%b got=%h want=%h", a, b, cin, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
