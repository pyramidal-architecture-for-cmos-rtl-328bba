// Ring scan sequencer: decides which ring is reset and read next.
//
// It runs one of the four patterns of the pyramidal sensor (see
// pyr_pkg::scan_mode_t) over the central `active_rings` rings, ring index 0
// being the inner 2x2 ring. A pass is one monotonic run over the active
// rings. In conventional (non-bouncing) scanning every pass starts again at
// the same end, like a rolling row scan. In bouncing scanning the direction
// reverses after the last ring of a pass and the turning ring is visited a
// second time at once, so one period is [A..1,1..A] (inward start) or
// [1..A,A..1] (outward start); this gives every ring two different
// integration times, one per pass.
//
// Interface: `start` (one cycle, while not running) latches the mode and the
// number of active rings and puts the first ring of the pattern on `ring`.
// Each `advance` pulse (from the readout controller, at the end of a ring
// visit) moves to the next ring. A new mode or ring count given while
// running takes effect at the next period boundary, so a period is never
// mixed. `inward` gives the direction of the current pass, `pass_first` /
// `pass_last` mark its ends, `second_pass` is high in the second pass of a
// bouncing period, and `warmup` is high during the first pass after start,
// whose rings had no reset of their own before being read.
//
// From the document: the four patterns of Fig. 5, including the repeated
// turning ring, and the choice of a reduced central set of rings (Sec. IV).
// The text also says that in bouncing "the outermost ring would be followed
// by the next closest ring"; this design follows Fig. 5, Fig. 7 and
// Eqs. (2)-(3), which repeat the turning ring. Handshake, latching at period
// boundaries and the warm-up flag are this design's own.
module scan_sequencer
  import pyr_pkg::*;
#(
  parameter int unsigned R  = R_RINGS,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         advance,
  input  scan_mode_t   mode,
  input  logic [RW:0]  active_rings,   // 1 .. R; 0 or above R means R
  output logic         running,
  output logic [RW-1:0] ring,          // 0-based ring index (ring number - 1)
  output logic [RW:0]  rings_in_use,   // latched ring count of this period
  output scan_mode_t   mode_in_use,    // latched pattern of this period
  output logic         inward,         // current pass runs from outer to inner
  output logic         pass_first,
  output logic         pass_last,
  output logic         second_pass,    // second pass of a bouncing period
  output logic         warmup,
  output logic         bounced         // one cycle: a bounce (direction reversal) happened
);

  scan_mode_t  mode_q;
  logic [RW:0] n_q;
  logic [RW-1:0] last_idx;

  function automatic logic [RW:0] clamp_rings(logic [RW:0] a);
    if (a == '0 || a > (RW+1)'(R)) return (RW+1)'(R);
    return a;
  endfunction

  assign last_idx     = RW'(n_q - 1'b1);
  assign rings_in_use = n_q;
  assign mode_in_use  = mode_q;
  assign pass_first   = inward ? (ring == last_idx) : (ring == '0);
  assign pass_last    = inward ? (ring == '0) : (ring == last_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      mode_q      <= '0;
      n_q         <= (RW+1)'(R);
      ring        <= '0;
      inward      <= 1'b1;
      second_pass <= 1'b0;
      warmup      <= 1'b0;
      bounced     <= 1'b0;
    end else begin
      bounced <= 1'b0;
      if (start && !running) begin
        logic [RW:0] n;
        n           = clamp_rings(active_rings);
        running     <= 1'b1;
        mode_q      <= mode;
        n_q         <= n;
        inward      <= !mode.outward;
        ring        <= mode.outward ? '0 : RW'(n - 1'b1);
        second_pass <= 1'b0;
        warmup      <= 1'b1;
      end else if (running && advance) begin
        if (!pass_last) begin
          ring <= inward ? ring - 1'b1 : ring + 1'b1;
        end else begin
          warmup <= 1'b0;
          if (mode_q.bounce && !second_pass) begin
            // turn around: the turning ring is read again straight away
            inward      <= !inward;
            second_pass <= 1'b1;
            bounced     <= 1'b1;
          end else begin
            // period boundary: take the new configuration
            logic [RW:0] n;
            n           = clamp_rings(active_rings);
            mode_q      <= mode;
            n_q         <= n;
            inward      <= !mode.outward;
            ring        <= mode.outward ? '0 : RW'(n - 1'b1);
            second_pass <= 1'b0;
            // a changed ring set leaves rings whose last reset is stale
            if (n != n_q || mode != mode_q) warmup <= 1'b1;
          end
        end
      end
    end
  end

  // the ring index never leaves the active set
  assert property (@(posedge clk) disable iff (!rst_n) running |-> ring <= last_idx)
    else $error("scan_sequencer: ring out of range");

endmodule
