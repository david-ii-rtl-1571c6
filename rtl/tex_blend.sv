// tex_blend: the texture-blend stage of the pixel pipeline.
//
// The filtered texel modulates the fragment colour channel by channel
// (texel * colour / 255, rounded) and the result is premultiplied by its own
// alpha, the form in which the pixel cache and the frame buffer keep colour.
// The modulate mode is this design's choice; the architecture only says the
// texel is blended with the pixel colour. Purely combinational.
module tex_blend
  import davidii_pkg::*;
(
  input  rgba_t texel,
  input  rgba_t frag_c,
  output rgba_t out_pm
);

  rgba_t m;

  always_comb begin
    m.a = mul8(texel.a, frag_c.a);
    m.r = mul8(texel.r, frag_c.r);
    m.g = mul8(texel.g, frag_c.g);
    m.b = mul8(texel.b, frag_c.b);
    out_pm.a = m.a;
    out_pm.r = mul8(m.r, m.a);
    out_pm.g = mul8(m.g, m.a);
    out_pm.b = mul8(m.b, m.a);
  end

endmodule
