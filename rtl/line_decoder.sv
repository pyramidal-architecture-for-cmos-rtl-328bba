// One-hot line decoder used three times in the imager: as the ring reset
// decoder, as the ring select decoder, and as the single global column select
// decoder that picks the same sample-and-hold position in all eight segments.
//
// When `en` is high, output line `addr` is driven high and all others low;
// when `en` is low, or `addr` is at or above `limit` (the number of lines in
// use, e.g. the active rings of a foveated scan), no line is driven.
// Purely combinational: the lines follow `en`/`addr` in the same cycle.
//
// The document names the decoders and their job (one ring bus per decoder
// output, Sec. II.B and the floorplan); the enable and the limit input are
// this design's own.
module line_decoder #(
  parameter int unsigned LINES = pyr_pkg::R_RINGS,
  localparam int unsigned AW   = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic            en,
  input  logic [AW-1:0]   addr,
  input  logic [AW:0]     limit,   // lines 0 .. limit-1 may be driven
  output logic [LINES-1:0] lines
);

  always_comb begin
    lines = '0;
    if (en && ({1'b0, addr} < limit) && (int'(addr) < LINES))
      lines[addr] = 1'b1;
  end

  always_comb assert ($onehot0(lines)) else $error("line_decoder: more than one line high");

endmodule
