// tb_ref_pkg: reference arithmetic for the testbenches, written independently
// of the RTL: rounding by integer division, bilinear weights expanded into the
// four products, blend written per channel from its definition.
package tb_ref_pkg;

  // round(a*b/255)
  function automatic int ref_mul(input int a, input int b);
    return (2 * a * b + 255) / 510;
  endfunction

  // premultiplied over of 32-bit ARGB words
  function automatic logic [31:0] ref_over(input logic [31:0] s, input logic [31:0] d);
    int k;
    logic [31:0] o;
    k = 255 - int'(s[31:24]);
    for (int ch = 0; ch < 4; ch++)
      o[ch*8 +: 8] = 8'(int'(s[ch*8 +: 8]) + ref_mul(int'(d[ch*8 +: 8]), k));
    return o;
  endfunction

  // bilinear, floor of the exact weighted mean with 8-bit fractions
  function automatic logic [31:0] ref_bilin(input logic [31:0] t00, input logic [31:0] t10,
                                            input logic [31:0] t01, input logic [31:0] t11,
                                            input int fu, input int fv);
    logic [31:0] o;
    longint s;
    for (int ch = 0; ch < 4; ch++) begin
      s = longint'(t00[ch*8 +: 8]) * (256 - fu) * (256 - fv)
        + longint'(t10[ch*8 +: 8]) * fu * (256 - fv)
        + longint'(t01[ch*8 +: 8]) * (256 - fu) * fv
        + longint'(t11[ch*8 +: 8]) * fu * fv;
      o[ch*8 +: 8] = 8'(s / 65536);
    end
    return o;
  endfunction

  // blend of two filtered texels by an 8-bit level weight, truncating
  function automatic logic [31:0] ref_lerp(input logic [31:0] x, input logic [31:0] y, input int w);
    logic [31:0] o;
    for (int ch = 0; ch < 4; ch++)
      o[ch*8 +: 8] = 8'((int'(x[ch*8 +: 8]) * (256 - w) + int'(y[ch*8 +: 8]) * w) / 256);
    return o;
  endfunction

  // first word of mip level l of a texture of side 2^tl
  function automatic int ref_level_base(input int tl, input int l);
    int b;
    b = 0;
    for (int k = 0; k < l; k++) b += 1 << (2 * (tl - k));
    return b;
  endfunction

  // modulate texel by colour, then premultiply by the result's alpha
  function automatic logic [31:0] ref_modulate_pm(input logic [31:0] t, input logic [31:0] c);
    int m [4];
    logic [31:0] o;
    for (int ch = 0; ch < 4; ch++) m[ch] = ref_mul(int'(t[ch*8 +: 8]), int'(c[ch*8 +: 8]));
    o[31:24] = 8'(m[3]);
    for (int ch = 0; ch < 3; ch++) o[ch*8 +: 8] = 8'(ref_mul(m[ch], m[3]));
    return o;
  endfunction

  // random premultiplied colour (each of r, g, b no larger than a)
  function automatic logic [31:0] rand_pm();
    logic [7:0] a;
    logic [31:0] o;
    a = 8'($urandom_range(0, 255));
    o[31:24] = a;
    for (int ch = 0; ch < 3; ch++) o[ch*8 +: 8] = 8'($urandom_range(0, int'(a)));
    return o;
  endfunction

endpackage
