// Self-checking test of adder_test_slice, one core with its test circuitry,
// clocked by a clock_gen at its default edges.
//
// 1. Scan in two random vectors (one with carry-in, one producing carry-out)
//    and their correct sums; run 40 cycles: the captured result must
//    alternate between the two sums, change once per 16-tick cycle, and the
//    comparator must never flag.
// 2. Rescan with a wrong expected sum for vector 1: the comparator must
//    pulse on every vector-1 result and set the sticky fail flag.
module tb_adder_test_slice;
  import ling_pkg::*;
  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, scan_out, run = 0;
  logic out, fail, contention, cycle_end;
  result_t result;
  phases_t ph;
  logic [3:0] cnt;
  int checks = 0, failures = 0;

  clock_gen u_ck (.clk(clk), .rst_n(rst_n), .cfg(CLK_CFG_DEFAULT), .ph(ph), .cnt(cnt),
                  .cycle_end(cycle_end));
  adder_test_slice dut (.clk(clk), .rst_n(rst_n), .ph(ph), .cycle_end(cycle_end),
                        .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out), .run(run),
                        .out(out), .fail(fail), .contention(contention), .result(result));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  operand_t v0, v1;
  result_t  e0, e1;

  task automatic load(result_t x0, result_t x1);
    logic [IN_SCANW+EXP_SCANW-1:0] img;
    img = {v1, v0, x1, x0};
    scan_en = 1;
    for (int i = 0; i < $bits(img); i++) begin
      scan_in = img[i];
      @(negedge clk);
    end
    scan_en = 0;
  endtask

  int pulses = 0;
  always @(posedge clk) if (rst_n && out) pulses++;

  initial begin
    v0 = '{a: {$urandom(), $urandom()}, b: {$urandom(), $urandom()}, cin: 1'b1};
    v1 = '{a: 64'hFFFF_FFFF_0000_FFFF, b: 64'h8000_0000_FFFF_0001, cin: 1'b0};
    e0 = {1'b0, v0.a} + {1'b0, v0.b} + 65'(v0.cin);
    e1 = {1'b0, v1.a} + {1'b0, v1.b} + 65'(v1.cin);
    repeat (2) @(negedge clk);
    rst_n = 1;
    load(e0, e1);
    run = 1;
    begin
      result_t prev;
      int changes;
      prev = result;
      changes = 0;
      repeat (3) begin do @(negedge clk); while (cnt != 2); end
      for (int n = 0; n < 40; n++) begin
        // one tick after capture: result is the previous cycle's vector
        checks++;
        if (result !== e0 && result !== e1) begin
          failures++;
          $display("result %h is neither sum", result);
        end
        checks++;
        if (n > 0 && result === prev) begin
          failures++;
          $display("result did not alternate");
        end
        prev = result;
        for (int k = 0; k < 14; k++) begin
          @(negedge clk);
          if (result !== prev) changes++;
        end
        repeat (2) @(negedge clk);
      end
      checks++;
      if (changes != 0) begin failures++; $display("result changed mid-cycle"); end
    end
    checks++;
    if (fail || pulses != 0 || contention) begin
      failures++;
      $display("false alarm: fail=%b pulses=%0d contention=%b", fail, pulses, contention);
    end
    // wrong expected value for vector 1
    run = 0;
    repeat (20) @(negedge clk);
    load(e0, e1 ^ 65'h4);
    pulses = 0;
    run = 1;
    repeat (16 * 20) @(negedge clk);
    checks++;
    if (!fail || pulses < 8 || pulses > 11) begin
      failures++;
      $display("planted error: fail=%b pulses=%0d (expect ~10)", fail, pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
