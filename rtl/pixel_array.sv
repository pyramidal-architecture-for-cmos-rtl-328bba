// Behavioural model of the pyramidal active-pixel array (simulation only:
// the pixels are analog, and the discharge is computed in real arithmetic).
// It stands in for the N x N three-transistor active pixels, their ring
// reset and ring select buses, the NMOS active resistors that turn pixel
// currents into voltages, and the pyramid diagonal buses that carry a
// selected ring's voltages to the eight sample-and-hold segments.
//
// Each ring is modelled by the time of its last reset (its pixels share
// the reset line). While its ring's
// reset line is high the pixel sits at VDD; afterwards it discharges linearly
// at a rate set by its `light` input, down to 0 V (saturation):
//   v = max(0, VDD - (light * (t - t_reset)) >> DISCHARGE_SHIFT)   [mV]
// with t and t_reset in clock cycles. Voltages are integer millivolt codes.
//
// Interface: `ring_reset[i]` / `ring_select[i]` are the lines of ring i+1
// (bit 0 = the inner 2x2 ring). `diag_bus[c][k]` is the voltage on position
// k's diagonal bus of cluster c; it shows the selected ring's pixel (or 0
// when no ring, or a ring too small to reach position k, is selected). The
// bus follows the select line in the same cycle. Pixel placement follows
// pyr_pkg::slot_x/slot_y; corner pixels sit on a diagonal and appear in both
// clusters that share it.
//
// From the document: the pixel type (reset, source follower, select, all
// NMOS), the ring-shared reset/select lines, the eight clusters and the
// diagonal buses. The linear discharge law, the saturation at 0 V and all
// numbers are this model's own.
module pixel_array
  import pyr_pkg::*;
#(
  parameter int unsigned N  = N_PIX,
  localparam int unsigned R = N / 2,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LIGHT_W-1:0] light [N][N],      // [y][x] photocurrent code
  input  logic [R-1:0]       ring_reset,
  input  logic [R-1:0]       ring_select,
  output logic [CODE_W-1:0]  diag_bus [N_CLUSTERS][R]
);

  logic [TIME_W-1:0] now;
  logic [TIME_W-1:0] t_reset [R];     // all pixels of a ring share the reset line

  // analog discharge, evaluated in real arithmetic; the result is exact
  // for the integer law above because light * dt stays below 2**53
  function automatic logic [CODE_W-1:0] volts(logic [LIGHT_W-1:0] l, logic [TIME_W-1:0] dt);
    real drop;
    drop = (real'(l) * real'(dt)) / real'(2 ** DISCHARGE_SHIFT);
    if (drop >= real'(VDD_CODE)) return '0;
    return CODE_W'(VDD_CODE - $rtoi(drop));   // $rtoi truncates, as >> does
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= '0;
      for (int r = 0; r < R; r++) t_reset[r] <= '0;
    end else begin
      now <= now + 1'b1;
      for (int r = 0; r < R; r++)
        if (ring_reset[r]) t_reset[r] <= now;
    end
  end

  // index of the selected ring
  logic [RW-1:0]          sel;
  logic                   any_sel;
  logic [TIME_W-1:0]      dt;

  always_comb begin
    sel     = '0;
    any_sel = 1'b0;
    for (int r = 0; r < R; r++)
      if (ring_select[r]) begin
        sel     = RW'(r);
        any_sel = 1'b1;
      end
  end

  assign dt = now - t_reset[sel];

  // one bus per cluster and position: pick the selected ring's pixel
  for (genvar c = 0; c < N_CLUSTERS; c++) begin : g_cluster
    for (genvar k = 0; k < R; k++) begin : g_pos
      logic [LIGHT_W-1:0] l;
      always_comb begin
        l = '0;
        for (int r = k; r < R; r++)
          if (int'(sel) == r) l = light[slot_y(N, c, r + 1, k)][slot_x(N, c, r + 1, k)];
      end
      assign diag_bus[c][k] = (!any_sel || k > int'(sel)) ? '0
                            : ring_reset[sel]             ? CODE_W'(VDD_CODE)
                            :                               volts(l, dt);
    end
  end

  // two rings on one diagonal bus would short the source followers
  always_comb assert ($onehot0(ring_select)) else $error("pixel_array: several rings selected");

endmodule
