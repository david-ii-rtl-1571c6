// ctest_alu: one consistency-test (C-test) ALU, i.e. the z-test and the
// alpha-blend of one pixel.
//
// The incoming pixel src passes when its depth is nearer (less) than that of the
// stored pixel dst. A passing pixel writes its own depth and the premultiplied
// "over" blend of its colour onto dst's colour; a failing one leaves dst as it
// was. The same ALU serves twice in the design: in each rasterizer's pixel cache
// (fragment against cached pixel) and, NUM_CTEST_ALUS at a time, between the MIU
// and the frame buffer (evicted cache pixel against frame-buffer pixel).
//
// Purely combinational. The pairing of z-test and alpha-blend follows the
// architecture; the "less" depth function and the premultiplied blend are this
// design's choices.
module ctest_alu
  import davidii_pkg::*;
(
  input  pixel_t src,
  input  pixel_t dst,
  output logic   pass,
  output pixel_t result
);

  always_comb begin
    pass = src.z < dst.z;
    if (pass) begin
      result.z = src.z;
      result.c = over(src.c, dst.c);
    end else begin
      result = dst;
    end
  end

endmodule
