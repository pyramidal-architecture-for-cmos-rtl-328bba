// Dual-integration-time image fusion for bouncing scanning.
//
// In a bouncing scan each pixel is read twice per period: once in the
// inward pass and once in the outward pass, with two different integration
// times whose ratio sets the dynamic range gain 20*log10(T_long/T_short) of
// that ring. This block first forms the correlated-double-sampling value of
// each of the eight parallel channels, cds = reset sample - signal sample
// (clamped at 0), and outputs it. In the first pass of a bouncing period it
// stores every cds value in a frame memory of 8 x R(R+1)/2 words, one per
// cluster slot (slot = r(r-1)/2 + k for ring r, position k). In the second
// pass it reads the stored value of the same slot and outputs the fused
// pixel, either by bit concatenation {inward value, outward value} or by
// addition inward + outward (the sum corresponds to the constant total
// integration time of a period, the same for every ring).
//
// Timing: `pix_valid` marks one pixel step of all eight channels; `cds` and
// `fused` appear one cycle later with `cds_valid` / `fused_valid` and the
// ring and position they belong to. A fused value is given only when both
// readings had a full integration (neither taken during warm-up).
//
// From the document: fusion of the two images on chip or off chip, by bit
// concatenation or by addition, and the need for a memory to build the
// final image. The memory organisation, the ideal conversion of the analog
// samples to 12-bit codes, the concatenation order and the timing are this
// design's own.
module image_fusion
  import pyr_pkg::*;
#(
  parameter int unsigned R   = R_RINGS,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned SLOTS = R * (R + 1) / 2,
  localparam int unsigned SW = $clog2(SLOTS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fuse_mode_t        fuse_mode,
  input  logic              bounce,        // current period is a bouncing one
  input  logic              pix_valid,
  input  logic [RW-1:0]     ring,          // 0-based ring index
  input  logic [RW-1:0]     col,           // position within the ring
  input  logic              inward,        // pass direction of this reading
  input  logic              second_pass,
  input  logic              warmup,
  input  logic [CODE_W-1:0] in_sig [N_CLUSTERS],
  input  logic [CODE_W-1:0] in_rst [N_CLUSTERS],
  output logic              cds_valid,
  output logic [RW-1:0]     out_ring,
  output logic [RW-1:0]     out_col,
  output logic              out_inward,
  output logic [CODE_W-1:0] cds [N_CLUSTERS],
  output logic              fused_valid,
  output logic [2*CODE_W-1:0] fused [N_CLUSTERS]
);

  logic [CODE_W-1:0] mem [N_CLUSTERS][SLOTS];
  logic [SLOTS-1:0]  slot_ok;     // stored reading had a full integration
  logic [SW-1:0]     slot;
  logic [CODE_W-1:0] cds_now [N_CLUSTERS];

  assign slot = SW'((32'(ring) + 1) * 32'(ring) / 2 + 32'(col));

  always_comb
    for (int c = 0; c < N_CLUSTERS; c++)
      cds_now[c] = (in_rst[c] > in_sig[c]) ? in_rst[c] - in_sig[c] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cds_valid   <= 1'b0;
      fused_valid <= 1'b0;
      out_ring    <= '0;
      out_col     <= '0;
      out_inward  <= 1'b0;
      slot_ok     <= '0;
      for (int c = 0; c < N_CLUSTERS; c++) begin
        cds[c]   <= '0;
        fused[c] <= '0;
      end
    end else begin
      cds_valid   <= pix_valid;
      fused_valid <= 1'b0;
      if (pix_valid) begin
        out_ring   <= ring;
        out_col    <= col;
        out_inward <= inward;
        for (int c = 0; c < N_CLUSTERS; c++) cds[c] <= cds_now[c];
        if (bounce && !second_pass) begin
          for (int c = 0; c < N_CLUSTERS; c++) mem[c][slot] <= cds_now[c];
          slot_ok[slot] <= !warmup;
        end else if (bounce && second_pass) begin
          fused_valid <= slot_ok[slot] && !warmup;
          for (int c = 0; c < N_CLUSTERS; c++) begin
            logic [CODE_W-1:0] v_in, v_out;
            v_in  = inward ? cds_now[c] : mem[c][slot];
            v_out = inward ? mem[c][slot] : cds_now[c];
            fused[c] <= (fuse_mode == FUSE_CONCAT) ? {v_in, v_out}
                                                   : (2*CODE_W)'(v_in) + (2*CODE_W)'(v_out);
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pix_valid |-> col <= ring)
    else $error("image_fusion: position outside ring");

endmodule
