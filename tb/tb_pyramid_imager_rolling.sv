// Full-size (64 x 64) testbench of conventional "rolling ring" scanning from
// the outer ring inward, the readout used for the first captured image, at
// the fast end of the timing ranges: T_spl = 1 us (4+3+3 cycles) and
// T_s = 0.1 us (1 cycle) at 10 MHz. After three full frames it narrows the
// scan to the 8 central rings (foveated readout) for three more frames and
// checks that the frame time falls from sum_{r=1..32}(r T_s + T_spl) to
// sum_{r=1..8}(r T_s + T_spl). pyr_scoreboard checks every visit, gap and
// CDS value.
module tb_pyramid_imager_rolling;
  import pyr_pkg::*;
  localparam int unsigned N = N_PIX, R = N / 2, RW = $clog2(R);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  scan_mode_t mode;
  logic [RW:0] active_rings;
  ring_timing_t timing;
  fuse_mode_t fuse_mode;
  logic from_corner;
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

  int frames = 0, fovea_frames = 0;
  longint cyc = 0, frame_start = -1;

  initial begin
    repeat (100000) @(posedge clk);
    sb.failures++;
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end

  function automatic longint frame_len(int a);
    longint s = 0;
    for (int r = 1; r <= a; r++) s += r * 1 + 10;
    return s;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (visit_start) begin
      sb.checks++;
      if (fused_valid) sb.failures++;
      if (pass_first) begin
        if (frame_start >= 0) begin
          longint e;
          e = frame_len(frames <= 3 ? 32 : 8);
          sb.checks++;
          if (cyc - frame_start != e) begin
            sb.failures++;
            $display("FAIL frame %0d lasted %0d cycles, expected %0d", frames, cyc - frame_start, e);
          end
        end
        frame_start <= cyc;
        frames <= frames + 1;
        if (dut.rings_in_use == 8) fovea_frames <= fovea_frames + 1;
        if (frames == 2) active_rings <= 8;   // taken at the next frame boundary
        if (frames == 6) begin
          sb.checks++;
          if (fovea_frames != 3) begin sb.failures++; $display("FAIL foveated frames %0d", fovea_frames); end
          $display("frames %0d (foveated %0d), full frame %0d cycles, foveated frame %0d cycles",
                   frames, fovea_frames, frame_len(32), frame_len(8));
          $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
          $finish;
        end
      end
    end
  end

  initial begin
    timing = '{t_sig: 16'd4, t_rst: 16'd3, t_srst: 16'd3, t_s: 16'd1};
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) light[y][x] = LIGHT_W'(500 + 40 * ((x + 2 * y) % 50));
    mode = '{bounce: 0, outward: 0};
    active_rings = (RW+1)'(R);
    fuse_mode = FUSE_ADD;
    from_corner = 1'b1;
    start = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
  end
endmodule
