// Self-checking testbench of scan_sequencer. For each of the four scan
// patterns (conventional / bouncing, inward / outward start) it runs three
// periods on a 4-ring instance and on a full 32-ring instance, advancing one
// ring per cycle, and compares the ring order with the patterns of the
// pyramidal sensor written out independently ([4,3,2,1], [4,3,2,1,1,2,3,4],
// [1,2,3,4], [1,2,3,4,4,3,2,1] for four rings). It also checks the pass
// direction, the warm-up flag of the first pass, that a reduced ring count
// (foveated scan) and a mode change take effect only at a period boundary.
module tb_scan_sequencer;
  import pyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int bounces = 0;

  // small instance
  logic start4, adv4, run4, inw4, pf4, pl4, sp4, wu4, b4;
  scan_mode_t mode4, miu4;
  logic [2:0] act4, riu4;
  logic [1:0] ring4;
  scan_sequencer #(.R(4)) dut4 (
    .clk, .rst_n, .start(start4), .advance(adv4), .mode(mode4), .active_rings(act4),
    .running(run4), .ring(ring4), .rings_in_use(riu4), .mode_in_use(miu4), .inward(inw4),
    .pass_first(pf4), .pass_last(pl4), .second_pass(sp4), .warmup(wu4), .bounced(b4));

  // full-size instance
  logic start32, adv32, run32, inw32, pf32, pl32, sp32, wu32, b32;
  scan_mode_t mode32, miu32;
  logic [5:0] act32, riu32;
  logic [4:0] ring32;
  scan_sequencer dut32 (
    .clk, .rst_n, .start(start32), .advance(adv32), .mode(mode32), .active_rings(act32),
    .running(run32), .ring(ring32), .rings_in_use(riu32), .mode_in_use(miu32), .inward(inw32),
    .pass_first(pf32), .pass_last(pl32), .second_pass(sp32), .warmup(wu32), .bounced(b32));

  always @(posedge clk) begin
    if (b4) bounces++;
    if (b32) bounces++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected ring number (1-based) at step s of a pattern over a rings
  function automatic int exp_ring(bit bounce, bit outward, int a, int s);
    int p, i;
    if (!bounce) begin
      i = s % a;
      return outward ? i + 1 : a - i;
    end
    p = s % (2 * a);
    if (p < a) return outward ? p + 1 : a - p;
    i = p - a;
    return outward ? a - i : i + 1;
  endfunction

  function automatic bit exp_inward(bit bounce, bit outward, int a, int s);
    int p;
    if (!bounce) return !outward;
    p = s % (2 * a);
    return (p < a) ? !outward : outward;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run4_pattern(bit bounce, bit outward, int a);
    int steps;
    rst_n = 0; start4 = 0; adv4 = 0; start32 = 0; adv32 = 0;
    @(posedge clk); #1 rst_n = 1;
    mode4 = '{bounce: bounce, outward: outward}; act4 = 3'(a);
    start4 = 1; @(posedge clk); #1 start4 = 0;
    steps = bounce ? 6 * a : 3 * a;
    for (int s = 0; s < steps; s++) begin
      check(run4, "running");
      check(int'(ring4) + 1 == exp_ring(bounce, outward, a, s),
            $sformatf("R4 b=%0d o=%0d a=%0d step %0d ring %0d exp %0d", bounce, outward, a, s,
                      ring4 + 1, exp_ring(bounce, outward, a, s)));
      check(inw4 == exp_inward(bounce, outward, a, s), "R4 direction");
      check(wu4 == (s < a), "R4 warm-up flag");
      adv4 = 1; @(posedge clk); #1 adv4 = 0;
    end
  endtask

  task automatic run32_pattern(bit bounce, bit outward, int a);
    int steps;
    rst_n = 0; start4 = 0; adv4 = 0; start32 = 0; adv32 = 0;
    @(posedge clk); #1 rst_n = 1;
    mode32 = '{bounce: bounce, outward: outward}; act32 = 6'(a);
    start32 = 1; @(posedge clk); #1 start32 = 0;
    steps = bounce ? 4 * a : 2 * a;
    for (int s = 0; s < steps; s++) begin
      check(int'(ring32) + 1 == exp_ring(bounce, outward, a, s),
            $sformatf("R32 b=%0d o=%0d step %0d ring %0d", bounce, outward, s, ring32 + 1));
      check(pf32 == (s % a == 0), "R32 pass_first");
      check(pl32 == (s % a == a - 1), "R32 pass_last");
      adv32 = 1; @(posedge clk); #1 adv32 = 0;
      // an idle cycle without advance keeps the ring
      if (s == 5) begin
        logic [4:0] keep;
        keep = ring32;
        @(posedge clk); #1;
        check(ring32 == keep, "R32 hold without advance");
      end
    end
  endtask

  initial begin
    mode4 = '0; mode32 = '0; act4 = 4; act32 = 32;
    for (int b = 0; b < 2; b++)
      for (int o = 0; o < 2; o++) begin
        run4_pattern(b[0], o[0], 4);
        run4_pattern(b[0], o[0], 2);      // foveated: inner two rings only
        run32_pattern(b[0], o[0], 32);
        run32_pattern(b[0], o[0], 9);
      end

    // configuration change mid-period: bouncing inward over 4 rings, then
    // ask for bouncing outward over 3 rings during the first period
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    mode4 = '{bounce: 1, outward: 0}; act4 = 4;
    start4 = 1; @(posedge clk); #1 start4 = 0;
    for (int s = 0; s < 8; s++) begin
      if (s == 2) begin mode4 = '{bounce: 1, outward: 1}; act4 = 3; end
      check(int'(ring4) + 1 == exp_ring(1, 0, 4, s), "old pattern kept until period end");
      adv4 = 1; @(posedge clk); #1 adv4 = 0;
    end
    for (int s = 0; s < 12; s++) begin
      check(int'(ring4) + 1 == exp_ring(1, 1, 3, s), "new pattern after period end");
      check(riu4 == 3, "new ring count in use");
      check(wu4 == (s < 3), "warm-up after a change");
      adv4 = 1; @(posedge clk); #1 adv4 = 0;
    end
    // active_rings = 0 means all rings
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    mode4 = '{bounce: 0, outward: 0}; act4 = 0;
    start4 = 1; @(posedge clk); #1 start4 = 0;
    check(ring4 == 3 && riu4 == 4, "zero ring count clamps to all rings");

    check(bounces > 0, "bounce happened");
    $display("bounces seen: %0d", bounces);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
