// Self-checking testbench of the pixel_array model on an 8 x 8 array (four
// rings). Every pixel gets its own illumination. For each ring it pulses the
// ring reset line, waits a chosen number of cycles, selects the ring and
// checks every diagonal bus against the discharge law computed here, with
// the ring / cluster / position of each pixel derived independently from its
// (x, y) coordinates. It also checks the VDD level while a ring is held in
// reset, the empty buses of unselected positions and saturation at 0 V.
module tb_pixel_array;
  import pyr_pkg::*;
  localparam int unsigned N = 8, R = N / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [LIGHT_W-1:0] light [N][N];
  logic [R-1:0] ring_reset, ring_select;
  logic [CODE_W-1:0] bus [N_CLUSTERS][R];

  pixel_array #(.N(N)) dut (.clk, .rst_n, .light, .ring_reset, .ring_select, .diag_bus(bus));

  int checks = 0, failures = 0, saturated = 0;
  longint cyc;
  longint t_rst [R];
  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expv(int l, longint dt);
    longint drop;
    drop = (longint'(l) * dt) >>> DISCHARGE_SHIFT;
    return (drop >= VDD_CODE) ? 0 : VDD_CODE - int'(drop);
  endfunction

  // check all buses with ring r (0-based) selected and not in reset
  task automatic check_ring(int r, bit in_reset);
    int h, cnt [N_CLUSTERS][R];
    h = N / 2;
    for (int c = 0; c < N_CLUSTERS; c++) for (int k = 0; k < R; k++) cnt[c][k] = 0;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int dx, dy, rr, e;
        int cl [2], kk [2], n;
        dx = (x >= h) ? x - h : h - 1 - x;
        dy = (y >= h) ? y - h : h - 1 - y;
        rr = (dx > dy) ? dx : dy;
        if (rr != r) continue;
        n = 0;
        if (dy == r) begin   // top or bottom side
          cl[n] = (y < h) ? ((x >= h) ? 0 : 7) : ((x >= h) ? 3 : 4);
          kk[n] = dx; n++;
        end
        if (dx == r) begin   // right or left side
          cl[n] = (x >= h) ? ((y < h) ? 1 : 2) : ((y >= h) ? 5 : 6);
          kk[n] = dy; n++;
        end
        e = in_reset ? VDD_CODE : expv(int'(light[y][x]), cyc - t_rst[r]);
        if (e == 0) saturated++;
        for (int i = 0; i < n; i++) begin
          checks++;
          cnt[cl[i]][kk[i]]++;
          if (int'(bus[cl[i]][kk[i]]) != e) begin
            failures++;
            if (failures < 20)
              $display("FAIL ring %0d pixel (%0d,%0d) c%0d k%0d got %0d exp %0d", r + 1, x, y,
                       cl[i], kk[i], bus[cl[i]][kk[i]], e);
          end
        end
      end
    // every position of the ring was reached once, the rest stays at 0
    for (int c = 0; c < N_CLUSTERS; c++)
      for (int k = 0; k < R; k++) begin
        checks++;
        if (k <= r) begin
          if (cnt[c][k] != 1) begin failures++; $display("FAIL slot c%0d k%0d count %0d", c, k, cnt[c][k]); end
        end else if (bus[c][k] != 0) begin
          failures++; $display("FAIL unused bus c%0d k%0d = %0d", c, k, bus[c][k]);
        end
      end
  endtask

  initial begin
    ring_reset = '0; ring_select = '0;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) light[y][x] = LIGHT_W'(40 + 37 * (y * N + x));
    light[0][0] = 16'hffff;   // saturates quickly
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int r = 0; r < R; r++) begin
        // reset for three cycles; the last one starts integration
        ring_reset = R'(1) << r;
        for (int n = 0; n < 3; n++) begin
          t_rst[r] = cyc;
          if (n == 1) begin
            ring_select = R'(1) << r; #1;
            check_ring(r, 1);
            ring_select = '0;
          end
          @(posedge clk); #1;
        end
        ring_reset = '0;
        repeat (50 + 400 * rep + 13 * r) @(posedge clk);
        #1 ring_select = R'(1) << r;
        #1 check_ring(r, 0);
        @(posedge clk); #1 check_ring(r, 0);
        ring_select = '0;
        #1;
        for (int c = 0; c < N_CLUSTERS; c++) begin
          checks++;
          if (bus[c][0] != 0) failures++;
        end
      end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL no pixel saturated"); end
    $display("saturated pixel readings: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
