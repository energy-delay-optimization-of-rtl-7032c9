// Test chip for the 64-bit Ling radix-4 sparse-2 domino adder.
//
// NUM_CORES adder cores, each with its own test circuitry (adder_test_slice),
// share one phase-clock generator. A single scan chain runs from `scan_in`
// through the clock generator's edge settings (CFGW bits, reset to working
// defaults) and then through every core's segment, core 0 first, to
// `scan_out`. Seen as one register with the first segment at the top, the
// chain image is {clk_cfg, core0, core1, ...}; shifting the image LSB first
// for its full length loads it. `run` starts at-speed operation; per core
// `out` pulses on each wrong result, `fail` and `contention` are sticky.
// `phases` and `tick` (position in the adder cycle) bring the clock
// generator out for observation, and `results`
// each core's last captured {cout, sum}.
//
// All signals run on the reference tick clock `clk`; one adder cycle is
// TICKS ticks. Eight cores and the shared clock generator follow the design;
// the scan order and the tick-level timing model are this design's choices.
// The chip's pads are not modelled; the ports stand for them.
module ling_test_chip
  import ling_pkg::*;
#(
  parameter int unsigned NUM_CORES = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 scan_en,
  input  logic                 scan_in,
  output logic                 scan_out,
  input  logic                 run,
  output logic [NUM_CORES-1:0] out,
  output logic [NUM_CORES-1:0] fail,
  output logic [NUM_CORES-1:0] contention,
  output phases_t              phases,
  output logic [TICK_W-1:0]    tick,
  output result_t [NUM_CORES-1:0] results
);

  // Clock-generator settings: first segment of the chain.
  clk_cfg_t cfg;
  logic     cfg_so;
  scan_chain #(.WIDTH(CFGW), .RESET_VAL(CLK_CFG_DEFAULT)) u_cfg_chain (
    .clk(clk), .rst_n(rst_n), .shift_en(scan_en), .si(scan_in), .so(cfg_so), .q(cfg));

  logic cycle_end;
  clock_gen u_ckgen (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .ph(phases), .cnt(tick), .cycle_end(cycle_end));

  logic [NUM_CORES:0] chain;
  assign chain[0] = cfg_so;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    adder_test_slice u_slice (
      .clk(clk), .rst_n(rst_n), .ph(phases), .cycle_end(cycle_end),
      .scan_en(scan_en), .scan_in(chain[c]), .scan_out(chain[c+1]), .run(run),
      .out(out[c]), .fail(fail[c]), .contention(contention[c]), .result(results[c]));
  end

  assign scan_out = chain[NUM_CORES];

endmodule
