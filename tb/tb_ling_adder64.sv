// Self-checking test of the domino adder core ling_adder64.
//
// The testbench makes its own 16-tick phase clocks. With working edges it
// applies a random vector each cycle and checks that the output is
// precharged (0) 4 ticks after pc1 rises and equals a + b + cin from the 5th
// tick to the end of the cycle (latency 5 ticks, one per domino stage), with
// no footless contention. Two mistimed settings are then checked for their
// effect: psel rising one tick early (before H64 settles) must corrupt some
// sums, and pc2 precharging while the PG stage still evaluates must raise the
// contention flag.
module tb_ling_adder64;
  import ling_pkg::*;
  logic clk = 0, rst_n = 0;
  phases_t ph;
  logic [63:0] a, b, sum;
  logic cin, cout, contention;
  int checks = 0, failures = 0;
  int cnt = 0;
  // edges: rise/fall per phase, order pc1, pc2, pc3, pc4, psel
  int rise [5] = '{0, 1, 2, 3, 4};
  int fall [5] = '{13, 14, 15, 1, 1};

  ling_adder64 dut (.clk(clk), .rst_n(rst_n), .ph(ph), .a(a), .b(b), .cin(cin),
                    .sum(sum), .cout(cout), .contention(contention));

  always #5 clk = ~clk;

  function automatic logic win(int r, int f, int t);
    return (r < f) ? (t >= r && t < f) : (t >= r || t < f);
  endfunction

  always_comb begin
    ph.pc1  = win(rise[0], fall[0], cnt);
    ph.pc2  = win(rise[1], fall[1], cnt);
    ph.pc3  = win(rise[2], fall[2], cnt);
    ph.pc4  = win(rise[3], fall[3], cnt);
    ph.psel = win(rise[4], fall[4], cnt);
  end

  always @(posedge clk) begin
    cnt <= (cnt == 15) ? 0 : cnt + 1;
    if (cnt == 15) begin
      a   <= {$urandom(), $urandom()};
      b   <= {$urandom(), $urandom()};
      cin <= 1'($urandom());
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int wrong_early = 0, cont_seen = 0;

  initial begin
    logic [64:0] want;
    a = '1; b = 64'h1; cin = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // skip the first (partial) cycle
    do @(negedge clk); while (cnt != 0);
    for (int n = 0; n < 400; n++) begin
      want = {1'b0, a} + {1'b0, b} + 65'(cin);
      while (cnt != 4) @(negedge clk);
      checks++;
      if ({cout, sum} !== '0) begin
        failures++;
        $display("output not precharged at tick 4: %h", {cout, sum});
      end
      @(negedge clk);   // tick 5
      checks++;
      if ({cout, sum} !== want) begin
        failures++;
        if (failures < 5) $display("tick5 a=%h b=%h cin=%b got=%h want=%h", a, b, cin, {cout, sum}, want);
      end
      while (cnt != 15) @(negedge clk);
      checks++;
      if ({cout, sum} !== want || contention) begin
        failures++;
        if (failures < 5) $display("tick15 got=%h want=%h cont=%b", {cout, sum}, want, contention);
      end
      @(negedge clk);
    end

    // psel one tick early: H64' is still high for nodes about to rise
    rise[4] = 3;
    repeat (2) begin do @(negedge clk); while (cnt != 0); end
    for (int n = 0; n < 100; n++) begin
      want = {1'b0, a} + {1'b0, b} + 65'(cin);
      while (cnt != 15) @(negedge clk);
      if ({cout, sum} !== want) wrong_early++;
      @(negedge clk);
    end
    checks++;
    if (wrong_early == 0) begin
      failures++;
      $display("early psel never corrupted a sum");
    end
    rise[4] = 4;

    // pc2 precharges at tick 5 while pc1 keeps PG evaluating until 13
    fall[1] = 5;
    for (int n = 0; n < 16 * 20; n++) begin
      @(negedge clk);
      if (contention) cont_seen++;
    end
    checks++;
    if (cont_seen == 0) begin
      failures++;
      $display("footless contention never flagged");
    end
    $display("early-psel wrong sums: %0d/100, contention ticks: %0d", wrong_early, cont_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
