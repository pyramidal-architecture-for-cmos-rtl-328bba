// Full-size testbench of pyramid_imager at its default size (64 x 64 pixels,
// 32 rings) with the timing of the integration-time study: T_s = T_spl =
// 10 us, i.e. 100 clock cycles each at 10 MHz. It runs three periods of
// bouncing scanning that starts inward ([32..1,1..32]): a warm-up period,
// a period fused by addition and one fused by bit concatenation.
// pyr_scoreboard checks every ring visit, integration gap, CDS value and
// fused pixel. From the measured gaps the testbench then checks the
// headline numbers of the study: the inward-pass integration time of ring 1
// (11170 us) and of ring 32 (320 us), a constant sum of both passes for
// every ring (11180 us, R(R+1) T_s + 2(R-1) T_spl), the dynamic range gain
// 20 log10(T_long / T_short) of about 61 dB at ring 1 and 30.6 dB at ring
// 32, and its minimum at ring 23.
module tb_pyramid_imager_full;
  import pyr_pkg::*;
  localparam int unsigned N = N_PIX, R = N / 2, RW = $clog2(R);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  scan_mode_t mode;
  logic [RW:0] active_rings;
  ring_timing_t timing;
  fuse_mode_t fuse_mode;
  logic from_corner = 1'b0;
  logic [LIGHT_W-1:0] light [N][N];
  logic [R-1:0] ring_reset_lines, ring_select_lines, col_select_lines;
  phase_t phase;
  logic running, visit_start, bounced, pass_first, pass_last;
  scan_mode_t mode_in_use;
  logic pix_valid, pix_inward, pix_warmup, cds_valid, cds_inward, fused_valid;
  logic [RW-1:0] pix_ring, pix_col, cds_ring, cds_col;
  logic [CODE_W-1:0] ch_sig [N_CLUSTERS], ch_rst [N_CLUSTERS], cds [N_CLUSTERS];
  logic [2*CODE_W-1:0] fused [N_CLUSTERS];

  pyramid_imager dut (.*);

  pyr_scoreboard #(.N(N)) sb (
    .clk, .rst_n, .timing, .fuse_mode, .light, .ring_reset_lines, .ring_select_lines,
    .col_select_lines, .phase, .visit_start, .bounced, .mode_in_use,
    .rings_in_use(dut.rings_in_use), .pix_valid, .pix_ring, .pix_inward, .pix_warmup,
    .cds_valid, .cds_ring, .cds_col, .cds_inward, .cds, .fused_valid, .fused);

  localparam int PERIOD_VISITS = 2 * R;
  int visit = 0, fused_count = 0;

  initial begin
    repeat (400000) @(posedge clk);
    sb.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end

  function automatic void check(bit cond, string what);
    sb.checks++;
    if (!cond) begin
      sb.failures++;
      $display("FAIL %s", what);
    end
  endfunction

  task automatic summary();
    real dr [R];
    int rmin;
    // cycles -> microseconds at the assumed clock
    for (int r = 0; r < R; r++) begin
      real tin, tout;
      tin  = real'(sb.gap_in[r]) / CLK_MHZ;
      tout = real'(sb.gap_out[r]) / CLK_MHZ;
      dr[r] = 20.0 * $log10((tin > tout ? tin : tout) / (tin > tout ? tout : tin));
      if (r % 4 == 0 || r == R - 1 || r == 22)
        $display("ring %2d: T_in %8.1f us  T_out %8.1f us  sum %8.1f us  DR gain %5.2f dB",
                 r + 1, tin, tout, tin + tout, dr[r]);
      check(sb.gap_in[r] + sb.gap_out[r] == 111800, $sformatf("ring %0d: cycle integration time", r + 1));
    end
    check(sb.gap_in[0] == 111700, "ring 1 inward-pass integration 11170 us");
    check(sb.gap_in[R-1] == 3200, "ring 32 inward-pass integration 320 us");
    check(sb.gap_out[0] == 100, "ring 1 outward-pass integration 10 us");
    check(dr[0] > 60.9 && dr[0] < 61.0, $sformatf("ring 1 DR gain %f dB", dr[0]));
    check(dr[R-1] > 30.5 && dr[R-1] < 30.7, $sformatf("ring 32 DR gain %f dB", dr[R-1]));
    rmin = 0;
    for (int r = 1; r < R; r++) if (dr[r] < dr[rmin]) rmin = r;
    check(rmin + 1 == 23, $sformatf("DR gain minimum at ring %0d", rmin + 1));
  endtask

  always @(posedge clk) if (rst_n) begin
    if (fused_valid) fused_count++;
    if (visit_start) begin
      int exp;
      int s;
      s = visit % PERIOD_VISITS;
      exp = (s < R) ? R - s : s - R + 1;
      check(int'(pix_ring) + 1 == exp, $sformatf("visit %0d ring %0d expected %0d", visit, pix_ring + 1, exp));
      if (visit == 2 * PERIOD_VISITS) fuse_mode <= FUSE_CONCAT;
      if (visit == 3 * PERIOD_VISITS) begin
        check(fused_count == 2 * R * (R + 1) / 2, $sformatf("fused pixel count %0d", fused_count));
        summary();
        sb.report_mechanisms(0, 0, 1);
        $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
        $finish;
      end
      visit <= visit + 1;
    end
  end

  initial begin
    timing = '{t_sig: 16'(DEF_T_SIG), t_rst: 16'(DEF_T_RST), t_srst: 16'(DEF_T_SRST), t_s: 16'(DEF_T_S)};
    // light falls off from a bright centre; some pixels saturate in the long pass
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) light[y][x] = LIGHT_W'(20 + $urandom_range(0, 400) + ((x * y) % 7) * 40);
    mode = '{bounce: 1, outward: 0};
    active_rings = (RW+1)'(R);
    fuse_mode = FUSE_ADD;
    start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
  end
endmodule
