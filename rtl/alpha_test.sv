// alpha_test: the alpha-test stage of the pixel pipeline.
//
// A fragment whose alpha, after texture blending, is below the reference value
// ref_alpha is discarded; with ref_alpha = 0 every fragment passes. The
// architecture places an alpha test after texture blending; the comparison
// (greater or equal) and the 8-bit reference register are this design's
// choices. Purely combinational.
module alpha_test (
  input  logic [7:0] alpha,
  input  logic [7:0] ref_alpha,
  output logic       pass
);

  always_comb pass = alpha >= ref_alpha;

endmodule
