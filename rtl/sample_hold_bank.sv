// Behavioural model of the eight sample-and-hold segments at the base of the
// pyramid, with their column switches and output buffers (analog in silicon).
//
// Each segment c has R signal capacitors and R reset capacitors, one pair per
// diagonal bus position. While `sh_sig` is high every signal capacitor tracks
// its bus and holds the last value when `sh_sig` falls; `sh_rst` does the same
// for the reset bank. This gives the two samples of correlated double
// sampling (ring output, then ring reset level). The one-hot `col_sel` from
// the global column decoder connects position k of all eight segments to
// their output buffers at once, so eight pixels leave the chip in parallel:
// `out_sig[c]` / `out_rst[c]` follow `col_sel` in the same cycle and are 0
// when no position is selected. The CDS subtraction is left to the consumer.
//
// From the document: eight banks, a signal bank and a reset bank for CDS,
// sequential selection by a single global decoder or per-segment decoders
// (this model uses the global one), and buffered outputs. Ideal, lossless
// capacitors and buffers are this model's own.
module sample_hold_bank
  import pyr_pkg::*;
#(
  parameter int unsigned R = R_RINGS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sh_sig,
  input  logic              sh_rst,
  input  logic [CODE_W-1:0] diag_bus [N_CLUSTERS][R],
  input  logic [R-1:0]      col_sel,
  output logic [CODE_W-1:0] out_sig [N_CLUSTERS],
  output logic [CODE_W-1:0] out_rst [N_CLUSTERS]
);

  logic [CODE_W-1:0] cap_sig [N_CLUSTERS][R];
  logic [CODE_W-1:0] cap_rst [N_CLUSTERS][R];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CLUSTERS; c++)
        for (int k = 0; k < R; k++) begin
          cap_sig[c][k] <= '0;
          cap_rst[c][k] <= '0;
        end
    end else begin
      for (int c = 0; c < N_CLUSTERS; c++)
        for (int k = 0; k < R; k++) begin
          if (sh_sig) cap_sig[c][k] <= diag_bus[c][k];
          if (sh_rst) cap_rst[c][k] <= diag_bus[c][k];
        end
    end
  end

  always_comb begin
    for (int c = 0; c < N_CLUSTERS; c++) begin
      out_sig[c] = '0;
      out_rst[c] = '0;
      for (int k = 0; k < R; k++)
        if (col_sel[k]) begin
          out_sig[c] = cap_sig[c][k];
          out_rst[c] = cap_rst[c][k];
        end
    end
  end

  always_comb assert ($onehot0(col_sel)) else $error("sample_hold_bank: several positions selected");

endmodule
