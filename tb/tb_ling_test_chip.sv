// End-to-end test of the test chip at its default size (8 cores, 16-tick
// cycle). Each phase loads the whole scan chain (clock edges plus every
// core's two vectors and expected sums) and runs the cores at speed.
//   A. default edges, correct expected sums: no core may flag, each core's
//      captured results must be its two sums, alternating; vectors use
//      carry-in and produce carry-out.
//   B. a wrong expected sum scanned into core 5 only: only core 5 flags.
//   C. psel edge moved one tick early through the scan chain: the sum-select
//      stage evaluates before H64 settles, so cores must flag errors.
//   D. pc2 precharge moved early through the scan chain: the footless H4
//      stage precharges while PG still evaluates, so contention must show.
// Counts of each mechanism are printed; one that never occurs is a failure.
module tb_ling_test_chip;
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
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  operand_t v0 [NC], v1 [NC];
  result_t  e0 [NC], e1 [NC];
  int n_scan = 0, n_compare = 0, n_cin = 0, n_cout = 0, n_planted = 0;
  int n_early_psel = 0, n_contention = 0, n_passes = 0;
  int pulses [NC];

  always @(posedge clk)
    for (int c = 0; c < NC; c++) if (rst_n && out[c]) pulses[c]++;

  task automatic load(clk_cfg_t cfg, int bad_core);
    logic [L-1:0] img;
    int pos;
    pos = L;
    pos -= CFGW;
    img[pos +: CFGW] = cfg;
    for (int c = 0; c < NC; c++) begin
      result_t x1;
      x1 = (c == bad_core) ? (e1[c] ^ 65'h1_0000_0000) : e1[c];
      pos -= IN_SCANW + EXP_SCANW;
      img[pos +: IN_SCANW + EXP_SCANW] = {v1[c], v0[c], x1, e0[c]};
    end
    run = 0;
    scan_en = 1;
    for (int i = 0; i < L; i++) begin
      scan_in = img[i];
      @(negedge clk);
    end
    scan_en = 0;
    n_scan++;
    for (int c = 0; c < NC; c++) pulses[c] = 0;
  endtask

  task automatic restart();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    clk_cfg_t cfg;
    for (int c = 0; c < NC; c++) begin
      v0[c] = '{a: {$urandom(), $urandom()}, b: {$urandom(), $urandom()}, cin: 1'(c % 2)};
      v1[c] = '{a: {$urandom(), $urandom()}, b: {$urandom(), $urandom()}, cin: 1'b1};
      if (c % 2 == 0) v1[c].a = ~v1[c].b;                // all-propagate: carry-in ripples to cout
      if (c == 3) begin v0[c].a = '1; v0[c].b = 64'h1; end
      e0[c] = {1'b0, v0[c].a} + {1'b0, v0[c].b} + 65'(v0[c].cin);
      e1[c] = {1'b0, v1[c].a} + {1'b0, v1[c].b} + 65'(v1[c].cin);
      n_cin  += int'(v0[c].cin) + int'(v1[c].cin);
      n_cout += int'(e0[c][64]) + int'(e1[c][64]);
    end
    restart();

    // A. correct operation
    load(CLK_CFG_DEFAULT, -1);
    run = 1;
    repeat (3) begin do @(negedge clk); while (tick != 2); end
    for (int n = 0; n < 30; n++) begin
      for (int c = 0; c < NC; c++) begin
        checks++;
        n_compare++;
        if (results[c] !== ((n % 2 == 0) ? e0[c] : e1[c]) &&
            results[c] !== ((n % 2 == 0) ? e1[c] : e0[c])) begin
          failures++;
          if (failures < 5) $display("core %0d result %h", c, results[c]);
        end
      end
      repeat (16) @(negedge clk);
    end
    checks++;
    if (fail != '0 || contention != '0) begin
      failures++;
      $display("A: fail=%b contention=%b", fail, contention);
    end else n_passes++;

    // B. planted wrong expected sum in core 5
    restart();
    load(CLK_CFG_DEFAULT, 5);
    run = 1;
    repeat (16 * 30) @(negedge clk);
    checks++;
    if (fail != 8'b0010_0000 || pulses[5] < 10) begin
      failures++;
      $display("B: fail=%b pulses5=%0d", fail, pulses[5]);
    end
    n_planted = pulses[5];

    // C. psel one tick early
    restart();
    cfg = CLK_CFG_DEFAULT;
    cfg.psel.rise = 4'd3;
    load(cfg, -1);
    run = 1;
    repeat (16 * 30) @(negedge clk);
    for (int c = 0; c < NC; c++) n_early_psel += pulses[c];
    checks++;
    if (fail == '0) begin
      failures++;
      $display("C: early psel not detected");
    end

    // D. pc2 precharges too early
    restart();
    cfg = CLK_CFG_DEFAULT;
    cfg.pc2.fall = 4'd5;
    load(cfg, -1);
    run = 1;
    repeat (16 * 10) @(negedge clk);
    for (int c = 0; c < NC; c++) n_contention += int'(contention[c]);
    checks++;
    if (contention != '1) begin
      failures++;
      $display("D: contention=%b", contention);
    end

    $display("mechanisms: scan loads=%0d result checks=%0d carry-in vectors=%0d carry-out vectors=%0d clean runs=%0d",
             n_scan, n_compare, n_cin, n_cout, n_passes);
    $display("mechanisms: planted mismatches=%0d early-psel mismatches=%0d cores with contention=%0d",
             n_planted, n_early_psel, n_contention);
    checks += 7;
    if (n_scan == 0 || n_compare == 0 || n_cin == 0 || n_cout == 0 || n_passes == 0 ||
        n_planted == 0 || n_early_psel == 0 || n_contention == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
