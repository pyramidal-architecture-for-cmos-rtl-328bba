// Ring readout timing controller.
//
// One visit of ring r (1-based) lasts T_ring = T_spl + r * T_s cycles
// (Eq. (1) of the pyramidal-sensor analysis). T_spl is made of three
// consecutive phases: the ring is selected and its output voltages sampled
// into the signal capacitor bank (PH_SIG, t_sig cycles), the ring is reset to
// VDD (PH_RST, t_rst), and the ring is selected again and its reset voltages
// sampled into the reset bank for correlated double sampling (PH_SRST,
// t_srst). Then the r sampled positions of each cluster are buffered out one
// after the other (PH_SCAN, t_s cycles each; position 0, next to the centre
// line of a side, first, or the corner position r-1 first), all eight clusters in
// parallel. The visit ends with a one-cycle `advance` to the scan sequencer,
// and the next ring's PH_SIG follows in the next cycle, without idle cycles.
//
// Interface: the controller leaves PH_IDLE when the sequencer reports
// `seq_running`. `ring` is the sequencer's 0-based ring index; it is copied
// to `ring_addr` for the ring decoders, which are enabled by `sel_en` and
// `rst_en`. `col_en` / `col_addr` drive the column select decoder, and
// `pix_valid` is high in the last cycle of each T_s step, when the buffered
// output has settled. `timing` is sampled at the start of every phase.
//
// From the document: the phase order, Eq. (1) and the sequential
// sample-then-scan timing of Fig. 7. This design's own: the cycle-count
// registers, the point where `pix_valid` is given, and the handshake.
// The document leaves the buffering order open ("from the pyramid diagonals
// towards the middle of the rings ... or vice versa"); `from_corner`, sampled
// when the scan phase begins, picks it for each visit.
module readout_controller
  import pyr_pkg::*;
#(
  parameter int unsigned R  = R_RINGS,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ring_timing_t  timing,
  input  logic          seq_running,
  input  logic [RW-1:0] ring,
  input  logic          from_corner,  // buffer positions r-1 .. 0 instead of 0 .. r-1
  output logic          advance,
  output phase_t        phase,
  output logic [RW-1:0] ring_addr,
  output logic          sel_en,
  output logic          rst_en,
  output logic          sh_sig,
  output logic          sh_rst,
  output logic          col_en,
  output logic [RW-1:0] col_addr,
  output logic          pix_valid,
  output logic          visit_start   // first cycle of a ring visit
);

  logic [TCFG_W-1:0] cnt;
  logic              cnt_done;
  logic              sig_seen;
  logic              down_q;          // buffering order of the current visit
  logic              last_col;

  function automatic logic [TCFG_W-1:0] minus1(logic [TCFG_W-1:0] v);
    return (v == '0) ? '0 : v - 1'b1;   // a zero setting behaves as 1
  endfunction

  assign cnt_done = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_IDLE;
      cnt      <= '0;
      col_addr <= '0;
      down_q   <= 1'b0;
    end else begin
      unique case (phase)
        PH_IDLE:
          if (seq_running) begin
            phase <= PH_SIG;
            cnt   <= minus1(timing.t_sig);
          end
        PH_SIG:
          if (cnt_done) begin
            phase <= PH_RST;
            cnt   <= minus1(timing.t_rst);
          end else cnt <= cnt - 1'b1;
        PH_RST:
          if (cnt_done) begin
            phase <= PH_SRST;
            cnt   <= minus1(timing.t_srst);
          end else cnt <= cnt - 1'b1;
        PH_SRST:
          if (cnt_done) begin
            phase    <= PH_SCAN;
            cnt      <= minus1(timing.t_s);
            down_q   <= from_corner;
            col_addr <= from_corner ? ring : '0;
          end else cnt <= cnt - 1'b1;
        PH_SCAN:
          if (cnt_done) begin
            if (last_col) begin
              phase <= PH_SIG;
              cnt   <= minus1(timing.t_sig);
            end else begin
              col_addr <= down_q ? col_addr - 1'b1 : col_addr + 1'b1;
              cnt      <= minus1(timing.t_s);
            end
          end else cnt <= cnt - 1'b1;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign last_col    = down_q ? (col_addr == '0) : (col_addr == ring);
  assign ring_addr   = ring;
  assign sel_en      = (phase == PH_SIG) || (phase == PH_SRST);
  assign rst_en      = (phase == PH_RST);
  assign sh_sig      = (phase == PH_SIG);
  assign sh_rst      = (phase == PH_SRST);
  assign col_en      = (phase == PH_SCAN);
  assign pix_valid   = (phase == PH_SCAN) && cnt_done;
  assign advance     = (phase == PH_SCAN) && cnt_done && last_col;
  assign visit_start = (phase == PH_SIG) && !sig_seen;

  // high in the cycle after a PH_SIG cycle: marks the first PH_SIG cycle
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sig_seen <= 1'b0;
    else        sig_seen <= (phase == PH_SIG);

  // a ring is never reset while it is selected
  always_comb assert (!(sel_en && rst_en)) else $error("readout_controller: select and reset together");
  // the scanned position never passes the ring's last position
  assert property (@(posedge clk) disable iff (!rst_n) phase == PH_SCAN |-> col_addr <= ring)
    else $error("readout_controller: column past ring");

endmodule
