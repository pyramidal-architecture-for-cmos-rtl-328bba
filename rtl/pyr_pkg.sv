// Shared types, constants and geometry of the pyramidal (ring-scanned) CMOS
// image sensor.
//
// The sensor is a square N x N array of active pixels grouped into R = N/2
// concentric square rings. Ring 1 is the 2x2 centre, ring R the outer border.
// Every ring shares one reset line and one select line. The two diagonals and
// the two centre lines cut the array into eight clusters; within a cluster,
// ring r holds r pixel positions k = 0 .. r-1, and position k of every ring
// shares one "pyramid diagonal" bus (the counterpart of a column bus).
//
// From the document: N = 64, R = 32, eight clusters, the four scan patterns,
// the three phases of the ring sampling period T_spl and the per-pixel scan
// period T_s. This design's own choices: the clock (10 MHz assumed when
// converting microseconds to cycles), the 12-bit voltage code in millivolts
// with VDD = 1800 mV, and the position numbering inside a cluster (k = 0 next
// to the centre line of a side, k = r-1 at the corner, so that each corner
// pixel lies on a diagonal and is read by both clusters that meet there).
package pyr_pkg;

  localparam int unsigned N_PIX      = 64;          // sensor edge in pixels
  localparam int unsigned R_RINGS    = N_PIX / 2;   // number of rings
  localparam int unsigned N_CLUSTERS = 8;           // output channels / S&H segments

  localparam int unsigned CODE_W   = 12;            // analog voltage code width (mV)
  localparam int unsigned VDD_CODE = 1800;          // reset level in mV
  localparam int unsigned LIGHT_W  = 16;            // photocurrent code width
  localparam int unsigned DISCHARGE_SHIFT = 10;     // mV = light * cycles >> SHIFT
  localparam int unsigned TIME_W   = 32;            // free-running time stamp width (wraps harmlessly)
  localparam int unsigned TCFG_W   = 16;            // width of each timing register

  // Default timing in clock cycles at the assumed 10 MHz clock: Fig. 8 uses
  // T_s = T_spl = 10 us, i.e. 100 cycles each; T_spl is split 34/33/33 over
  // its three phases.
  localparam int unsigned CLK_MHZ      = 10;
  localparam int unsigned DEF_T_SIG    = 34;
  localparam int unsigned DEF_T_RST    = 33;
  localparam int unsigned DEF_T_SRST   = 33;
  localparam int unsigned DEF_T_S      = 100;

  // Scan pattern, numbered as in Fig. 5:
  //   (1) non-bouncing inward  [4,3,2,1]          bounce=0 outward=0
  //   (2) bouncing inward      [4,3,2,1,1,2,3,4]  bounce=1 outward=0
  //   (3) non-bouncing outward [1,2,3,4]          bounce=0 outward=1
  //   (4) bouncing outward     [1,2,3,4,4,3,2,1]  bounce=1 outward=1
  typedef struct packed {
    logic bounce;    // 1: reverse direction after the last ring of a pass
    logic outward;   // 1: the pattern starts at the inner ring
  } scan_mode_t;

  // Ring visit timing, all counts in clock cycles, each at least 1.
  // T_spl = t_sig + t_rst + t_srst; one ring visit lasts T_spl + r * t_s.
  typedef struct packed {
    logic [TCFG_W-1:0] t_sig;   // ring output (signal) sampling phase
    logic [TCFG_W-1:0] t_rst;   // ring reset phase
    logic [TCFG_W-1:0] t_srst;  // ring reset-voltage sampling phase
    logic [TCFG_W-1:0] t_s;     // buffering out one pixel position
  } ring_timing_t;

  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_SIG  = 3'd1,   // ring selected, signal bank sampling
    PH_RST  = 3'd2,   // ring reset to VDD
    PH_SRST = 3'd3,   // ring selected, reset bank sampling
    PH_SCAN = 3'd4    // S&H positions buffered out, one per t_s
  } phase_t;

  // Fusion of the two images of a bouncing period (Sec. II.D).
  typedef enum logic {
    FUSE_CONCAT = 1'b0,   // {inward-pass value, outward-pass value}
    FUSE_ADD    = 1'b1    // inward-pass value + outward-pass value
  } fuse_mode_t;

  // Pixel coordinates of cluster c, ring r (1-based), position k, in an
  // n x n array. x grows to the right, y downwards. Clusters run clockwise
  // from the right half of the top side.
  function automatic int unsigned slot_x(int unsigned n, int unsigned c,
                                         int unsigned r, int unsigned k);
    int unsigned h;
    h = n / 2;
    case (c)
      0, 3:    return h + k;
      1, 2:    return h + r - 1;
      4, 7:    return h - 1 - k;
      default: return h - r;        // 5, 6
    endcase
  endfunction

  function automatic int unsigned slot_y(int unsigned n, int unsigned c,
                                         int unsigned r, int unsigned k);
    int unsigned h;
    h = n / 2;
    case (c)
      0, 7:    return h - r;
      1, 6:    return h - 1 - k;
      2, 5:    return h + k;
      default: return h + r - 1;    // 3, 4
    endcase
  endfunction

  // Number of S&H slots of one cluster used by rings 1 .. r-1: r(r-1)/2.
  function automatic int unsigned ring_base(int unsigned r);
    return (r * (r - 1)) / 2;
  endfunction

endpackage
