// Self-checking testbench of image_fusion with four rings. It plays the
// readings of a bouncing scan ([4,3,2,1] then [1,2,3,4]) with random signal
// and reset samples on all eight channels: a warm-up period first, then full
// periods in concatenation mode and in addition mode, with both pass orders.
// It checks the CDS value of every reading (including the clamp when the
// signal sample is above the reset sample), that no fused pixel is given for
// warm-up readings, and every fused value against the pair kept here.
module tb_image_fusion;
  import pyr_pkg::*;
  localparam int unsigned R = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fuse_mode_t fuse_mode;
  logic bounce, pix_valid, inward, second_pass, warmup;
  logic [1:0] ring, col;
  logic [CODE_W-1:0] in_sig [N_CLUSTERS], in_rst [N_CLUSTERS];
  logic cds_valid, fused_valid, out_inward;
  logic [1:0] out_ring, out_col;
  logic [CODE_W-1:0] cds [N_CLUSTERS];
  logic [2*CODE_W-1:0] fused [N_CLUSTERS];

  image_fusion #(.R(R)) dut (.clk, .rst_n, .fuse_mode, .bounce, .pix_valid, .ring, .col, .inward,
    .second_pass, .warmup, .in_sig, .in_rst, .cds_valid, .out_ring, .out_col, .out_inward, .cds,
    .fused_valid, .fused);

  int checks = 0, failures = 0, fused_seen = 0, clamps = 0;
  int keep [N_CLUSTERS][R][R];   // first-pass CDS value per cluster / ring / position

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one reading of ring r position k; second: second pass of the period
  task automatic reading(int r, int k, bit inw, bit second, bit wu, fuse_mode_t fm, bit first_valid);
    int exp_cds [N_CLUSTERS];
    ring = 2'(r); col = 2'(k); inward = inw; second_pass = second; warmup = wu; fuse_mode = fm;
    for (int c = 0; c < N_CLUSTERS; c++) begin
      in_sig[c] = CODE_W'($urandom_range(0, 1800));
      in_rst[c] = CODE_W'($urandom_range(1500, 1800));
      exp_cds[c] = (in_rst[c] > in_sig[c]) ? int'(in_rst[c]) - int'(in_sig[c]) : 0;
      if (in_rst[c] <= in_sig[c]) clamps++;
    end
    pix_valid = 1;
    @(posedge clk); #1;
    pix_valid = 0;
    check(cds_valid && out_ring == 2'(r) && out_col == 2'(k) && out_inward == inw, "cds strobe and tags");
    for (int c = 0; c < N_CLUSTERS; c++) check(int'(cds[c]) == exp_cds[c], $sformatf("cds c%0d", c));
    if (!second) begin
      check(!fused_valid, "no fused value in first pass");
      for (int c = 0; c < N_CLUSTERS; c++) keep[c][r][k] = exp_cds[c];
    end else begin
      check(fused_valid == (first_valid && !wu), "fused strobe");
      if (fused_valid) fused_seen++;
      if (first_valid && !wu)
        for (int c = 0; c < N_CLUSTERS; c++) begin
          int vin, vout;
          logic [2*CODE_W-1:0] e;
          vin  = inw ? exp_cds[c] : keep[c][r][k];
          vout = inw ? keep[c][r][k] : exp_cds[c];
          e = (fm == FUSE_CONCAT) ? {CODE_W'(vin), CODE_W'(vout)} : (2*CODE_W)'(vin + vout);
          check(fused[c] == e, $sformatf("fused c%0d ring %0d pos %0d got %h exp %h", c, r, k, fused[c], e));
        end
    end
    @(posedge clk); #1;
  endtask

  task automatic period(bit outward_first, bit wu_first, fuse_mode_t fm);
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < R; i++) begin
        int r;
        bit inw;
        inw = (p == 0) ? !outward_first : outward_first;
        r = inw ? R - 1 - i : i;
        for (int k = 0; k <= r; k++)
          reading(r, k, inw, p == 1, (p == 0) && wu_first, fm, !wu_first);
      end
  endtask

  initial begin
    pix_valid = 0; bounce = 1; warmup = 0; second_pass = 0; inward = 1; ring = 0; col = 0;
    fuse_mode = FUSE_CONCAT;
    for (int c = 0; c < N_CLUSTERS; c++) begin in_sig[c] = 0; in_rst[c] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    period(0, 1, FUSE_CONCAT);   // warm-up period: nothing fused
    period(0, 0, FUSE_CONCAT);
    period(0, 0, FUSE_ADD);
    period(1, 0, FUSE_ADD);
    period(1, 0, FUSE_CONCAT);
    // conventional scanning: cds only, never a fused value
    bounce = 0;
    for (int k = 0; k < R; k++) begin
      ring = 2'(R - 1); col = 2'(k); second_pass = 0;
      pix_valid = 1; @(posedge clk); #1 pix_valid = 0;
      check(cds_valid && !fused_valid, "conventional scan gives cds only");
      @(posedge clk); #1;
    end
    check(fused_seen == 4 * R * (R + 1) / 2, "fused pixel count");
    check(clamps > 0, "CDS clamp exercised");
    $display("fused %0d, clamps %0d", fused_seen, clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
