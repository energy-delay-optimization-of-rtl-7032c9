// Timing sweep of the test chip, the way the chip finds the earliest working
// edge: the psel rise tick is moved through the scan chain from 1 to 15 while
// every core adds worst-case vectors (a carry that ripples through all 64
// bits, with and without carry-in). For each setting the cores run 12 cycles
// and the sticky fail flags are read.
//
// Expected from the stage latencies: H64 is settled from tick 4 of the cycle
// (PG, H4, H16, H64 evaluate on ticks 0..3), so psel rising at 4 or later
// must pass on every core, and rising at 1..3 must fail on every core.
module tb_psel_sweep;
  import ling_pkg::*;
  localparam int NC = 8;
  localparam int L  = CFGW + NC * (IN_SCANW + EXP_SCANW);

  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, scan_out, run = 0;
  logic [NC-1:0] out, fail, contention;
  phases_t phases;
  logic [3:0] tick;
  result_t [NC-1:0] results;
  int checks = 0, failures = 0;

  ling_test_chip dut (.clk(clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in),
                      .scan_out(scan_out), .run(run), .out(out), .fail(fail),
                      .contention(contention), .phases(phases), .tick(tick),
                      .results(results));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] img;
    clk_cfg_t cfg;
    int pos, earliest;
    earliest = -1;
    for (int rise = 1; rise < 16; rise++) begin
      cfg = CLK_CFG_DEFAULT;
      cfg.psel.rise = 4'(rise);
      pos = L - CFGW;
      img[pos +: CFGW] = cfg;
      for (int c = 0; c < NC; c++) begin
        operand_t v0, v1;
        result_t e0, e1;
        logic [63:0] x;
        x = {$urandom(), $urandom()};
        // v0: all-propagate word with carry-in -> carry runs from cin to cout
        v0 = '{a: x, b: ~x, cin: 1'b1};
        // v1: generate at bit 0 only, propagate above it
        v1 = '{a: {x[63:1], 1'b1}, b: {~x[63:1], 1'b1}, cin: 1'b0};
        e0 = {1'b0, v0.a} + {1'b0, v0.b} + 65'(v0.cin);
        e1 = {1'b0, v1.a} + {1'b0, v1.b} + 65'(v1.cin);
        pos -= IN_SCANW + EXP_SCANW;
        img[pos +: IN_SCANW + EXP_SCANW] = {v1, v0, e1, e0};
      end
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      scan_en = 1;
      for (int i = 0; i < L; i++) begin
        scan_in = img[i];
        @(negedge clk);
      end
      scan_en = 0;
      run = 1;
      repeat (16 * 12) @(negedge clk);
      run = 0;
      checks++;
      if (rise >= 4 ? (fail != '0) : (fail != '1)) begin
        failures++;
        $display("psel rise %0d: fail=%b", rise, fail);
      end
      if (fail == '0 && earliest < 0) earliest = rise;
    end
    $display("earliest working psel rise: tick %0d", earliest);
    checks++;
    if (earliest != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
