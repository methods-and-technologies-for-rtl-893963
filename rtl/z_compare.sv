// Depth test of the pixel ALU.
//
// The stored depth (Z-src, already on the screen) is compared with the depth
// of the incoming pixel (Z-dst).  Z-pass when Z-dst is smaller: the new
// pixel is in front and may change the colour; otherwise Z-fail and the
// stored pixel is kept.  Equal depths fail, this design's reading of
// "smaller".  Unsigned magnitude compare, combinational.
module z_compare #(
  parameter int ZW = 32
) (
  input  logic [ZW-1:0] z_src,   // stored depth
  input  logic [ZW-1:0] z_dst,   // incoming depth
  output logic          z_pass   // incoming pixel is visible
);
  assign z_pass = (z_dst < z_src);
endmodule
