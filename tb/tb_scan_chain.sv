// Self-checking test of scan_chain (37 bits): reset value, shifting a random
// pattern in (first bit ends in q[0]), serial output order, and holding when
// shift_en is low.
module tb_scan_chain;
  localparam int W = 37;
  localparam logic [W-1:0] RV = 37'h12_3456_789A;
  logic clk = 0, rst_n = 0, shift_en = 0, si = 0, so;
  logic [W-1:0] q, pat;
  int checks = 0, failures = 0;

  scan_chain #(.WIDTH(W), .RESET_VAL(RV)) dut (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .si(si), .so(so), .q(q));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (q !== RV) begin failures++; $display("reset value %h", q); end
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      logic [W-1:0] old;
      pat = {$urandom(), $urandom()};
      old = q;
      shift_en = 1;
      for (int i = 0; i < W; i++) begin
        si = pat[i];
        checks++;
        if (so !== old[i]) begin failures++; $display("so bit %0d", i); end
        @(negedge clk);
      end
      shift_en = 0;
      si = ~si;
      repeat (3) @(negedge clk);
      checks++;
      if (q !== pat) begin failures++; $display("q=%h pat=%h", q, pat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
