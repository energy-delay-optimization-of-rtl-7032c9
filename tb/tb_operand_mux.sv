// Self-checking test of operand_mux: vector 0 while idle, alternation at
// every cycle_end while running, the select changing only at cycle_end.
module tb_operand_mux;
  import ling_pkg::*;
  logic clk = 0, rst_n = 0, run = 0, cycle_end = 0, sel;
  operand_t vec0, vec1, vec;
  int checks = 0, failures = 0;

  operand_mux dut (.clk(clk), .rst_n(rst_n), .run(run), .cycle_end(cycle_end),
                   .vec0(vec0), .vec1(vec1), .vec(vec), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_sel;
    vec0 = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
    vec1 = ~vec0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_sel = 0;
    for (int n = 0; n < 400; n++) begin
      run = (n >= 50 && n < 350);
      cycle_end = (n % 4 == 3);
      @(negedge clk);
      if (cycle_end) exp_sel = run ? ~exp_sel : 1'b0;
      checks++;
      if (sel !== exp_sel || vec !== (exp_sel ? vec1 : vec0)) begin
        failures++;
        if (failures < 5) $display("n=%0d sel=%b exp=%b", n, sel, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
