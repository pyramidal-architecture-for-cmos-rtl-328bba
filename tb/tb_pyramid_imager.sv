// End-to-end testbench of pyramid_imager on an 8 x 8 sensor (four rings)
// with short phases, so that many periods run in little time. It runs, one
// after the other without stopping the scan: bouncing inward with fusion by
// addition, bouncing outward with fusion by concatenation, conventional
// inward scanning, a foveated conventional outward scan of the two inner
// rings and a foveated bouncing scan of three rings; the second and fourth
// configurations buffer each ring from its corners inward. The next configuration
// is applied in the middle of the last period of the previous one, so the
// switch at the period boundary is exercised. The ring order is compared
// with the expected patterns; pyr_scoreboard checks timing, integration
// gaps, CDS and fused values and counts the mechanisms.
module tb_pyramid_imager;
  import pyr_pkg::*;
  localparam int unsigned N = 8, R = N / 2, RW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  scan_mode_t mode;
  logic [RW:0] active_rings;
  ring_timing_t timing;
  fuse_mode_t fuse_mode;
  logic from_corner;
  int corner_visits = 0;
  logic [LIGHT_W-1:0] light [N][N];
  logic [R-1:0] ring_reset_lines, ring_select_lines, col_select_lines;
  phase_t phase;
  logic running, visit_start, bounced, pass_first, pass_last;
  scan_mode_t mode_in_use;
  logic pix_valid, pix_inward, pix_warmup, cds_valid, cds_inward, fused_valid;
  logic [RW-1:0] pix_ring, pix_col, cds_ring, cds_col;
  logic [CODE_W-1:0] ch_sig [N_CLUSTERS], ch_rst [N_CLUSTERS], cds [N_CLUSTERS];
  logic [2*CODE_W-1:0] fused [N_CLUSTERS];

  pyramid_imager #(.N(N)) dut (.*);

  pyr_scoreboard #(.N(N)) sb (
    .clk, .rst_n, .timing, .fuse_mode, .light, .ring_reset_lines, .ring_select_lines,
    .col_select_lines, .phase, .visit_start, .bounced, .mode_in_use,
    .rings_in_use(dut.rings_in_use), .pix_valid, .pix_ring, .pix_inward, .pix_warmup,
    .cds_valid, .cds_ring, .cds_col, .cds_inward, .cds, .fused_valid, .fused);

  initial begin
    repeat (200000) @(posedge clk);
    sb.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end

  typedef struct { bit bounce; bit outward; int a; int periods; fuse_mode_t fm; } cfg_t;
  cfg_t cfgs [5] = '{
    '{1, 0, 4, 3, FUSE_ADD},
    '{1, 1, 4, 2, FUSE_CONCAT},
    '{0, 0, 4, 3, FUSE_ADD},
    '{0, 1, 2, 3, FUSE_ADD},
    '{1, 0, 3, 2, FUSE_ADD}
  };

  int exp_seq [$];
  int change_at [5];   // visit index at which cfg i+1 is applied
  int fused_count = 0;
  int visit = 0;

  function automatic void build();
    int total = 0;
    foreach (cfgs[i]) begin
      int plen;
      plen = cfgs[i].bounce ? 2 * cfgs[i].a : cfgs[i].a;
      for (int p = 0; p < cfgs[i].periods; p++)
        for (int s = 0; s < plen; s++) begin
          int ring;
          if (s < cfgs[i].a) ring = cfgs[i].outward ? s + 1 : cfgs[i].a - s;
          else ring = cfgs[i].outward ? 2 * cfgs[i].a - s : s - cfgs[i].a + 1;
          exp_seq.push_back(ring);
        end
      total += plen * cfgs[i].periods;
      change_at[i] = total - plen + 1;   // first visit of the last period, plus one
    end
  endfunction

  task automatic apply(int i);
    from_corner = (i % 2 == 1);
    mode = '{bounce: cfgs[i].bounce, outward: cfgs[i].outward};
    active_rings = (RW+1)'(cfgs[i].a);
    fuse_mode = cfgs[i].fm;
  endtask

  int cfg_now = 0;
  always @(posedge clk) if (rst_n) begin
    if (fused_valid) fused_count++;
    if (visit_start && from_corner) corner_visits++;
    if (visit_start) begin
      sb.checks++;
      if (visit >= exp_seq.size()) begin
        // all configurations done
        $display("visits %0d, fused pixels %0d", visit, fused_count);
        sb.checks++;
        if (fused_count != 20 + 10 + 6) begin
          sb.failures++;
          $display("FAIL fused count %0d", fused_count);
        end
        sb.report_mechanisms(1, 1, 1);
        sb.checks++;
        if (corner_visits == 0) begin sb.failures++; $display("FAIL no corner-first buffering"); end
        $display("corner-first visits %0d", corner_visits);
        $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
        $finish;
      end else if (int'(pix_ring) + 1 != exp_seq[visit]) begin
        sb.failures++;
        if (sb.failures < 20) $display("FAIL visit %0d ring %0d expected %0d", visit, pix_ring + 1, exp_seq[visit]);
      end
      if (cfg_now < 4 && visit == change_at[cfg_now]) begin
        cfg_now++;
        apply(cfg_now);
      end
      visit++;
    end
  end

  initial begin
    build();
    timing = '{t_sig: 16'd2, t_rst: 16'd1, t_srst: 16'd2, t_s: 16'd2};
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) light[y][x] = LIGHT_W'($urandom_range(50, 60000));
    start = 0;
    apply(0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
  end
endmodule
