// tex_filter: bilinear / trilinear texture filter.
//
// Takes two 2x2 texel footprints, A from mip level L and B from level L+1, each
// with the 8-bit fractions of the texture coordinate at its level, and the
// 8-bit level fraction lodf. Each footprint is filtered bilinearly per channel:
//   top = t00*(256-fu) + t10*fu,  bot = t01*(256-fu) + t11*fu,
//   bil = (top*(256-fv) + bot*fv) >> 16            (truncating)
// and the two levels are blended:
//   out = (bilA*(256-lodf) + bilB*lodf) >> 8        (truncating).
// With lodf = 0 the result is exactly the bilinear filter of A (four texels);
// otherwise it is trilinear (eight texels). Purely combinational.
//
// Bilinear and trilinear filtering of four or eight texels follow the
// architecture's pixel pipeline; the weight precision is this design's choice.
module tex_filter
  import davidii_pkg::*;
(
  input  rgba_t      a00,
  input  rgba_t      a10,
  input  rgba_t      a01,
  input  rgba_t      a11,
  input  logic [7:0] afu,
  input  logic [7:0] afv,
  input  rgba_t      b00,
  input  rgba_t      b10,
  input  rgba_t      b01,
  input  rgba_t      b11,
  input  logic [7:0] bfu,
  input  logic [7:0] bfv,
  input  logic [7:0] lodf,
  output rgba_t      out
);

  function automatic logic [7:0] bilin(input logic [7:0] c00, input logic [7:0] c10,
                                       input logic [7:0] c01, input logic [7:0] c11,
                                       input logic [7:0] wu, input logic [7:0] wv);
    logic [16:0] top, bot;
    logic [25:0] sum;
    top = 17'(c00) * (17'd256 - 17'(wu)) + 17'(c10) * 17'(wu);
    bot = 17'(c01) * (17'd256 - 17'(wu)) + 17'(c11) * 17'(wu);
    sum = 26'(top) * (26'd256 - 26'(wv)) + 26'(bot) * 26'(wv);
    return sum[23:16];
  endfunction

  function automatic logic [7:0] lerp(input logic [7:0] x, input logic [7:0] y, input logic [7:0] w);
    logic [16:0] s;
    s = 17'(x) * (17'd256 - 17'(w)) + 17'(y) * 17'(w);
    return s[15:8];
  endfunction

  rgba_t bil_a, bil_b;

  always_comb begin
    bil_a.a = bilin(a00.a, a10.a, a01.a, a11.a, afu, afv);
    bil_a.r = bilin(a00.r, a10.r, a01.r, a11.r, afu, afv);
    bil_a.g = bilin(a00.g, a10.g, a01.g, a11.g, afu, afv);
    bil_a.b = bilin(a00.b, a10.b, a01.b, a11.b, afu, afv);
    bil_b.a = bilin(b00.a, b10.a, b01.a, b11.a, bfu, bfv);
    bil_b.r = bilin(b00.r, b10.r, b01.r, b11.r, bfu, bfv);
    bil_b.g = bilin(b00.g, b10.g, b01.g, b11.g, bfu, bfv);
    bil_b.b = bilin(b00.b, b10.b, b01.b, b11.b, bfu, bfv);
    out.a = lerp(bil_a.a, bil_b.a, lodf);
    out.r = lerp(bil_a.r, bil_b.r, lodf);
    out.g = lerp(bil_a.g, bil_b.g, lodf);
    out.b = lerp(bil_a.b, bil_b.b, lodf);
  end

endmodule
