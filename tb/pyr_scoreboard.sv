// Testbench checker for pyramid_imager, shared by the reduced end-to-end
// test and the full-size test. It watches the imager's ports and checks,
// independently of the RTL:
//  - ring visit length T_spl + r * T_s (Eq. (1)),
//  - the integration gap of every ring against the closed forms of the
//    bouncing analysis, Eq. (2) for readings in an inward pass and Eq. (3)
//    for readings in an outward pass, or the frame time minus T_spl in
//    conventional scanning (all with the active ring count in place of R),
//  - every CDS value of all eight channels, recomputed from the light of the
//    pixel and the reset / sample cycles seen on the ring and S&H lines,
//  - every fused pixel against the two readings kept here,
//  - that ring reset and ring select lines stay one-hot and never overlap.
// It also counts how often each mechanism happened (bounces at the inner and
// outer ring, conventional wrap-around, foveated scans, saturated pixels,
// both fusion modes, warm-up readings).
module pyr_scoreboard
  import pyr_pkg::*;
#(
  parameter int unsigned N  = 8,
  localparam int unsigned R  = N / 2,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  ring_timing_t       timing,
  input  fuse_mode_t         fuse_mode,
  input  logic [LIGHT_W-1:0] light [N][N],
  input  logic [R-1:0]       ring_reset_lines,
  input  logic [R-1:0]       ring_select_lines,
  input  logic [R-1:0]       col_select_lines,
  input  phase_t             phase,
  input  logic               visit_start,
  input  logic               bounced,
  input  scan_mode_t         mode_in_use,
  input  logic [RW:0]        rings_in_use,
  input  logic               pix_valid,
  input  logic [RW-1:0]      pix_ring,
  input  logic               pix_inward,
  input  logic               pix_warmup,
  input  logic               cds_valid,
  input  logic [RW-1:0]      cds_ring,
  input  logic [RW-1:0]      cds_col,
  input  logic               cds_inward,
  input  logic [CODE_W-1:0]  cds [N_CLUSTERS],
  input  logic               fused_valid,
  input  logic [2*CODE_W-1:0] fused [N_CLUSTERS]
);

  int checks = 0, failures = 0;
  int n_visits = 0, n_gap_checks = 0, n_bounce_inner = 0, n_bounce_outer = 0, n_wrap = 0;
  int n_fovea = 0, n_saturated = 0, n_fused_add = 0, n_fused_concat = 0, n_warmup = 0;
  int n_cds = 0;
  longint cyc = 0;
  longint rst_t [R];
  longint sig_dt [R], srst_dt [R];
  longint prev_start [R];
  bit     seen [R];
  longint cur_start = -1;
  int     cur_ring = 0, prev_ring = -1;
  bit     prev_inward = 0;
  int     val_in [N_CLUSTERS][R][R], val_out [N_CLUSTERS][R][R];
  // integration gaps of the last checked readings, per pass direction
  longint gap_in [R], gap_out [R];

  function automatic void fail(string what);
    failures++;
    if (failures < 30) $display("SCOREBOARD FAIL: %s (cycle %0d)", what, cyc);
  endfunction

  function automatic int volts(int l, longint dt);
    longint drop;
    drop = (longint'(l) * dt) >>> DISCHARGE_SHIFT;
    return (drop >= VDD_CODE) ? 0 : VDD_CODE - int'(drop);
  endfunction

  function automatic longint tspl();
    return longint'(timing.t_sig) + longint'(timing.t_rst) + longint'(timing.t_srst);
  endfunction

  // Eq. (2): inward-pass reading of ring r (1-based) over a rings
  function automatic longint eq2(int r, int a);
    longint s = 0;
    for (int i = r + 1; i <= a; i++) s += longint'(i) * longint'(timing.t_s);
    return 2 * (s + longint'(a - r) * tspl()) + longint'(r) * longint'(timing.t_s);
  endfunction

  // Eq. (3): outward-pass reading of ring r (1-based)
  function automatic longint eq3(int r);
    longint s = 0;
    for (int i = 1; i <= r - 1; i++) s += longint'(i) * longint'(timing.t_s);
    return 2 * (s + longint'(r - 1) * tspl()) + longint'(r) * longint'(timing.t_s);
  endfunction

  function automatic int idx_of(logic [R-1:0] v);
    for (int i = 0; i < R; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial for (int r = 0; r < R; r++) begin
    rst_t[r] = 0; sig_dt[r] = 0; srst_dt[r] = 0; seen[r] = 0; prev_start[r] = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
    end else begin
      int rs, rr;
      cyc <= cyc + 1;
      // line rules
      checks++;
      if (!$onehot0(ring_reset_lines) || !$onehot0(ring_select_lines) || !$onehot0(col_select_lines)
          || (ring_reset_lines & ring_select_lines) != '0)
        fail("ring / column lines not one-hot or reset overlaps select");

      if (visit_start) begin
        int r;
        r = int'(pix_ring) + 1;
        n_visits++;
        if (int'(rings_in_use) < int'(R)) n_fovea++;
        if (pix_warmup) n_warmup++;
        // Eq. (1)
        if (cur_start >= 0) begin
          checks++;
          if (cyc - cur_start != tspl() + longint'(cur_ring) * longint'(timing.t_s))
            fail($sformatf("visit of ring %0d lasted %0d cycles", cur_ring, cyc - cur_start));
        end
        // turning points and wrap-around
        if (cur_start >= 0 && cur_ring == r && r == 1) n_bounce_inner++;
        if (cur_start >= 0 && cur_ring == r && r == int'(rings_in_use)) n_bounce_outer++;
        if (!mode_in_use.bounce && cur_start >= 0 &&
            ((cur_ring == 1 && r == int'(rings_in_use)) || (cur_ring == int'(rings_in_use) && r == 1)))
          n_wrap++;
        // integration gap, Eqs. (2) and (3)
        if (seen[r-1] && !pix_warmup) begin
          longint gap, e;
          gap = cyc - (prev_start[r-1] + tspl());
          if (mode_in_use.bounce) e = pix_inward ? eq2(r, int'(rings_in_use)) : eq3(r);
          else begin
            e = 0;
            for (int i = 1; i <= int'(rings_in_use); i++)
              e += longint'(i) * longint'(timing.t_s) + tspl();
            e -= tspl();
          end
          checks++;
          n_gap_checks++;
          if (gap != e) fail($sformatf("ring %0d integration gap %0d, expected %0d (inward=%0d)",
                                       r, gap, e, pix_inward));
          if (pix_inward) gap_in[r-1] = gap; else gap_out[r-1] = gap;
        end
        seen[r-1] = 1;
        prev_start[r-1] = cyc;
        cur_start = cyc;
        prev_ring = cur_ring;
        cur_ring = r;
        prev_inward = pix_inward;
      end

      if (cds_valid) begin
        int r, k;
        r = int'(cds_ring);
        k = int'(cds_col);
        n_cds++;
        for (int c = 0; c < N_CLUSTERS; c++) begin
          int l, vs, vr, e;
          l  = int'(light[slot_y(N, c, r + 1, k)][slot_x(N, c, r + 1, k)]);
          vs = volts(l, sig_dt[r]);
          vr = volts(l, srst_dt[r]);
          e  = (vr > vs) ? vr - vs : 0;
          if (vs == 0) n_saturated++;
          checks++;
          if (int'(cds[c]) != e)
            fail($sformatf("cds ring %0d pos %0d cluster %0d = %0d, expected %0d", r + 1, k, c, cds[c], e));
          if (cds_inward) val_in[c][r][k] = e; else val_out[c][r][k] = e;
        end
      end

      if (fused_valid) begin
        for (int c = 0; c < N_CLUSTERS; c++) begin
          logic [2*CODE_W-1:0] e;
          int r, k;
          r = int'(cds_ring);
          k = int'(cds_col);
          e = (fuse_mode == FUSE_CONCAT) ? {CODE_W'(val_in[c][r][k]), CODE_W'(val_out[c][r][k])}
                                         : (2*CODE_W)'(val_in[c][r][k] + val_out[c][r][k]);
          checks++;
          if (fused[c] != e) fail($sformatf("fused ring %0d pos %0d cluster %0d", r + 1, k, c));
        end
        if (fuse_mode == FUSE_CONCAT) n_fused_concat++; else n_fused_add++;
      end

      // sample times seen on the lines; applied after the checks above, which
      // may still refer to the previous visit of the same ring
      rs = idx_of(ring_select_lines);
      rr = idx_of(ring_reset_lines);
      if (rr >= 0) rst_t[rr] = cyc;
      if (phase == PH_SRST && rs >= 0) srst_dt[rs] = cyc - rst_t[rs];
      if (phase == PH_SIG && rs >= 0) sig_dt[rs] = cyc - rst_t[rs];
    end
  end

  function automatic void report_mechanisms(bit need_fovea, bit need_wrap, bit need_concat);
    $display("visits %0d, gap checks %0d, cds %0d, bounces inner %0d outer %0d, wraps %0d, fovea visits %0d",
             n_visits, n_gap_checks, n_cds, n_bounce_inner, n_bounce_outer, n_wrap, n_fovea);
    $display("saturated readings %0d, fused add %0d concat %0d, warm-up visits %0d",
             n_saturated, n_fused_add, n_fused_concat, n_warmup);
    checks += 7;
    if (n_gap_checks == 0) fail("no integration gap checked");
    if (n_bounce_inner == 0) fail("no bounce at the inner ring");
    if (n_bounce_outer == 0) fail("no bounce at the outer ring");
    if (n_saturated == 0) fail("no saturated pixel");
    if (n_fused_add == 0) fail("no fusion by addition");
    if (n_warmup == 0) fail("no warm-up pass");
    if (n_cds == 0) fail("no pixel read");
    if (need_fovea) begin checks++; if (n_fovea == 0) fail("no foveated scan"); end
    if (need_wrap) begin checks++; if (n_wrap == 0) fail("no conventional wrap-around"); end
    if (need_concat) begin checks++; if (n_fused_concat == 0) fail("no fusion by concatenation"); end
  endfunction

endmodule
