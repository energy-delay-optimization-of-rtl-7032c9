// Phase-clock generator for the domino adder cores.
//
// A tick counter divides the reference clock into adder cycles of TICKS
// ticks. Each of the five phases (pc1..pc4, psel; 1 = evaluate) is high from
// its programmed `rise` tick up to, not including, its `fall` tick; a window
// with fall <= rise wraps through the cycle boundary, which is how the later
// stages evaluate across it (delayed precharge). The edges come from the
// scan chain, so each critical edge can be moved by whole ticks. `cnt` is the
// tick index (registered), `cycle_end` is high on the last tick of a cycle.
// Phases are decoded from the registered counter, so they change one per tick
// without glitches. The five phase names and scan-tunable edges follow the
// design; the tick-grid generator is this implementation's own choice.
module clock_gen
  import ling_pkg::*;
#(
  parameter int unsigned TICKS_P = TICKS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  clk_cfg_t          cfg,
  output phases_t           ph,
  output logic [TICK_W-1:0] cnt,
  output logic              cycle_end
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               cnt <= '0;
    else if (cnt == TICK_W'(TICKS_P - 1))     cnt <= '0;
    else                                      cnt <= cnt + 1'b1;
  end

  function automatic logic in_window(edge_t e, logic [TICK_W-1:0] t);
    if (e.rise < e.fall) return (t >= e.rise) && (t < e.fall);
    else                 return (t >= e.rise) || (t < e.fall);
  endfunction

  always_comb begin
    ph.pc1  = in_window(cfg.pc1,  cnt);
    ph.pc2  = in_window(cfg.pc2,  cnt);
    ph.pc3  = in_window(cfg.pc3,  cnt);
    ph.pc4  = in_window(cfg.pc4,  cnt);
    ph.psel = in_window(cfg.psel, cnt);
  end

  assign cycle_end = (cnt == TICK_W'(TICKS_P - 1));

endmodule
