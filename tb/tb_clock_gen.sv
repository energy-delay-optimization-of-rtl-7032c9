// Self-checking test of clock_gen: over several cycles, with the default and
// with random edge settings, every phase must be high exactly on the ticks
// of its programmed window (wrapping windows included), the cycle must last
// 16 ticks and cycle_end must mark its last tick.
module tb_clock_gen;
  import ling_pkg::*;
  logic clk = 0, rst_n = 0;
  clk_cfg_t cfg;
  phases_t ph;
  logic [3:0] cnt;
  logic cycle_end;
  int checks = 0, failures = 0;

  clock_gen dut (.clk(clk), .rst_n(rst_n), .cfg(cfg), .ph(ph), .cnt(cnt), .cycle_end(cycle_end));

  always #5 clk = ~clk;

  function automatic logic win(int r, int f, int t);
    if (r < f) return t >= r && t < f;
    return t >= r || t < f;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    cfg = CLK_CFG_DEFAULT;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      if (round > 0)
        for (int k = 0; k < 5; k++) begin
          cfg[8*k +: 8] = 8'($urandom());
        end
      // tick position is tracked independently from reset
      for (int n = 0; n < 48; n++) begin
        phases_t want;
        #1;
        t = (round * 48 + n) % 16;
        want.pc1  = win(cfg.pc1.rise,  cfg.pc1.fall,  t);
        want.pc2  = win(cfg.pc2.rise,  cfg.pc2.fall,  t);
        want.pc3  = win(cfg.pc3.rise,  cfg.pc3.fall,  t);
        want.pc4  = win(cfg.pc4.rise,  cfg.pc4.fall,  t);
        want.psel = win(cfg.psel.rise, cfg.psel.fall, t);
        checks++;
        if (ph !== want || cnt !== 4'(t) || cycle_end !== (t == 15)) begin
          failures++;
          if (failures < 5) $display("t=%0d cnt=%0d ph=%b want=%b", t, cnt, ph, want);
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
