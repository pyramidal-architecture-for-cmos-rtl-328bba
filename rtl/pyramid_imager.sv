// Pyramidal CMOS image sensor: ring-scanned readout of an N x N active pixel
// array with eight parallel output channels and dual-exposure fusion.
//
// Instead of rows, the array is read by concentric square rings. The scan
// sequencer picks the next ring (conventional or bouncing order, inward or
// outward, over the active central rings); the readout controller times one
// visit of that ring: select it and sample its voltages into the signal
// banks, reset it, sample its reset level into the reset banks, then buffer
// out its r positions through the global column decoder, eight clusters at a
// time. Two line decoders drive the ring reset and ring select buses, a
// third one the sample-and-hold column switches. The pixel array and the
// sample-and-hold banks are behavioural models of analog circuits; the
// fusion block forms the CDS value of every channel and, in bouncing
// scanning, merges the inward-pass and outward-pass readings of each pixel.
//
// Interface: `start` begins scanning with `mode` / `active_rings` (changes
// are taken at period boundaries); `from_corner` sets the order in which
// the positions of a ring are buffered out; `timing` gives the phase lengths in clock
// cycles; `light[y][x]` is the illumination of each pixel. `ch_sig`/`ch_rst`
// are the eight buffered analog outputs (millivolt codes) at `pix_valid`,
// with the ring / position / pass that they belong to; `cds` and `fused`
// follow one cycle later. The ring, column and phase lines are brought out
// for observation.
//
// The structure follows the document's pyramidal architecture (Sec. II.B-D,
// floorplan of Sec. III). The on-chip fusion path is one of the two options
// it names (on chip or off chip); the ideal conversion of analog samples to
// codes, and all widths and handshakes, are this design's own.
module pyramid_imager
  import pyr_pkg::*;
#(
  parameter int unsigned N  = N_PIX,
  localparam int unsigned R  = N / 2,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  scan_mode_t         mode,
  input  logic [RW:0]        active_rings,
  input  ring_timing_t       timing,
  input  fuse_mode_t         fuse_mode,
  input  logic               from_corner,   // buffer each ring from its corners inward
  input  logic [LIGHT_W-1:0] light [N][N],
  // ring buses and column switches
  output logic [R-1:0]       ring_reset_lines,
  output logic [R-1:0]       ring_select_lines,
  output logic [R-1:0]       col_select_lines,
  output phase_t             phase,
  output logic               running,
  output logic               visit_start,
  output logic               bounced,
  output scan_mode_t         mode_in_use,   // pattern of the current period
  output logic               pass_first,    // current visit opens a pass (image)
  output logic               pass_last,     // current visit closes a pass
  // eight buffered analog outputs
  output logic               pix_valid,
  output logic [RW-1:0]      pix_ring,
  output logic [RW-1:0]      pix_col,
  output logic               pix_inward,
  output logic               pix_warmup,
  output logic [CODE_W-1:0]  ch_sig [N_CLUSTERS],
  output logic [CODE_W-1:0]  ch_rst [N_CLUSTERS],
  // CDS and fused pixels
  output logic               cds_valid,
  output logic [RW-1:0]      cds_ring,
  output logic [RW-1:0]      cds_col,
  output logic               cds_inward,
  output logic [CODE_W-1:0]  cds [N_CLUSTERS],
  output logic               fused_valid,
  output logic [2*CODE_W-1:0] fused [N_CLUSTERS]
);

  logic [RW-1:0] ring, ring_addr, col_addr;
  logic [RW:0]   rings_in_use;
  logic          advance, inward, second_pass, warmup;
  logic          sel_en, rst_en, sh_sig, sh_rst, col_en;
  logic [CODE_W-1:0] diag_bus [N_CLUSTERS][R];

  scan_sequencer #(.R(R)) u_seq (
    .clk, .rst_n, .start, .advance, .mode, .active_rings,
    .running, .ring, .rings_in_use, .mode_in_use, .inward,
    .pass_first, .pass_last, .second_pass, .warmup, .bounced
  );

  readout_controller #(.R(R)) u_ctrl (
    .clk, .rst_n, .timing, .seq_running(running), .ring, .from_corner, .advance, .phase,
    .ring_addr, .sel_en, .rst_en, .sh_sig, .sh_rst, .col_en, .col_addr,
    .pix_valid, .visit_start
  );

  line_decoder #(.LINES(R)) u_ring_reset_dec (
    .en(rst_en), .addr(ring_addr), .limit(rings_in_use), .lines(ring_reset_lines)
  );

  line_decoder #(.LINES(R)) u_ring_select_dec (
    .en(sel_en), .addr(ring_addr), .limit(rings_in_use), .lines(ring_select_lines)
  );

  line_decoder #(.LINES(R)) u_col_select_dec (
    .en(col_en), .addr(col_addr), .limit((RW+1)'(ring_addr) + 1'b1), .lines(col_select_lines)
  );

  pixel_array #(.N(N)) u_pixels (
    .clk, .rst_n, .light, .ring_reset(ring_reset_lines), .ring_select(ring_select_lines),
    .diag_bus
  );

  sample_hold_bank #(.R(R)) u_sh (
    .clk, .rst_n, .sh_sig, .sh_rst, .diag_bus, .col_sel(col_select_lines),
    .out_sig(ch_sig), .out_rst(ch_rst)
  );

  image_fusion #(.R(R)) u_fuse (
    .clk, .rst_n, .fuse_mode, .bounce(mode_in_use.bounce), .pix_valid,
    .ring, .col(col_addr), .inward, .second_pass, .warmup,
    .in_sig(ch_sig), .in_rst(ch_rst),
    .cds_valid, .out_ring(cds_ring), .out_col(cds_col), .out_inward(cds_inward),
    .cds, .fused_valid, .fused
  );

  assign pix_ring   = ring;
  assign pix_col    = col_addr;
  assign pix_inward = inward;
  assign pix_warmup = warmup;

endmodule
