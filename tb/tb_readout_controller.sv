// Self-checking testbench of readout_controller. A small ring order
// ([4,3,2,1,1,2,3,4], a bouncing period of a 4-ring sensor) is fed from the
// testbench. For two timing settings it checks, cycle by cycle, the phase
// order signal-sample / reset / reset-sample / scan, the length of every
// phase, the ring visit length T_spl + r * T_s of Eq. (1), the column
// addresses 0 .. r-1 (or r-1 .. 0 in corner-first order) with one pixel
// strobe per T_s, the single advance pulse
// per visit, and that select, reset and sample strobes are never mixed.
module tb_readout_controller;
  import pyr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ring_timing_t timing;
  logic running, from_corner;
  logic [1:0] ring;
  logic advance, sel_en, rst_en, sh_sig, sh_rst, col_en, pix_valid, visit_start;
  logic [1:0] ring_addr, col_addr;
  phase_t phase;

  readout_controller #(.R(4)) dut (
    .clk, .rst_n, .timing, .seq_running(running), .ring, .from_corner, .advance, .phase,
    .ring_addr, .sel_en, .rst_en, .sh_sig, .sh_rst, .col_en, .col_addr,
    .pix_valid, .visit_start);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int order [8] = '{3, 2, 1, 0, 0, 1, 2, 3};
  int idx;

  // testbench-side sequencer
  always @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      idx  <= 0;
      ring <= 2'(order[0]);
    end else if (advance) begin
      idx  <= (idx + 1) % 8;
      ring <= 2'(order[(idx + 1) % 8]);
    end

  task automatic run(int ts, int tsig, int trst, int tsrst, int visits, bit fc = 0);
    int t0, tspl;
    timing = '{t_sig: 16'(tsig), t_rst: 16'(trst), t_srst: 16'(tsrst), t_s: 16'(ts)};
    tspl = tsig + trst + tsrst;
    rst_n = 0; running = 0; from_corner = fc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(phase == PH_IDLE && !sel_en && !rst_en && !col_en, "idle after reset");
    running = 1;
    @(posedge clk); #1;
    for (int v = 0; v < visits; v++) begin
      int r;
      r = int'(ring) + 1;
      check(visit_start, "visit_start on first cycle");
      for (int c = 0; c < tsig; c++) begin
        check(phase == PH_SIG && sel_en && sh_sig && !rst_en && !sh_rst && !col_en,
              $sformatf("signal phase v%0d c%0d", v, c));
        check(ring_addr == 2'(r - 1), "ring address");
        check(!advance && !pix_valid, "no strobe while sampling");
        @(posedge clk); #1;
      end
      for (int c = 0; c < trst; c++) begin
        check(phase == PH_RST && rst_en && !sel_en && !sh_sig && !sh_rst, "reset phase");
        @(posedge clk); #1;
      end
      for (int c = 0; c < tsrst; c++) begin
        check(phase == PH_SRST && sel_en && sh_rst && !sh_sig && !rst_en, "reset-sample phase");
        @(posedge clk); #1;
      end
      for (int k = 0; k < r; k++)
        for (int c = 0; c < ts; c++) begin
          check(phase == PH_SCAN && col_en && !sel_en && !rst_en, "scan phase");
          check(int'(col_addr) == (fc ? r - 1 - k : k), $sformatf("column %0d of ring %0d got %0d", k, r, col_addr));
          check(pix_valid == (c == ts - 1), "pixel strobe on last T_s cycle");
          check(advance == (c == ts - 1 && k == r - 1), "advance at end of visit");
          @(posedge clk); #1;
        end
    end
    running = 0;
  endtask

  // independent check of Eq. (1): visit_start spacing = T_spl + r * T_s
  int last_start = -1, last_ring = 0, cyc = 0, exp_len = 0, visits_seen = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) last_start <= -1;
    else if (visit_start) begin
      if (last_start >= 0) begin
        checks++;
        if (cyc - last_start != exp_len + last_ring * int'(timing.t_s)) begin
          failures++;
          $display("FAIL visit length %0d, expected %0d", cyc - last_start,
                   exp_len + last_ring * int'(timing.t_s));
        end
        visits_seen++;
      end
      last_start <= cyc;
      last_ring  <= int'(ring) + 1;
      exp_len    <= int'(timing.t_sig) + int'(timing.t_rst) + int'(timing.t_srst);
    end
  end

  initial begin
    run(2, 2, 3, 1, 10);
    run(1, 1, 1, 1, 9);
    run(5, 4, 2, 3, 8);
    run(2, 1, 2, 1, 9, 1);   // corner-first buffering order
    run(1, 1, 1, 1, 8, 1);
    check(visits_seen >= 20, "visit length measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
