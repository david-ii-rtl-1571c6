// davidii_pkg: types and arithmetic shared by the parallel rendering processor.
//
// A pixel is a 24-bit depth value and an 8-bit-per-channel RGBA colour held in
// premultiplied form (r, g and b already multiplied by a). The pixel cache and
// the frame buffer both work on 4x4-pixel blocks; a block moving from a pixel
// cache to the frame buffer carries, besides its 16 pixels, a mask saying which
// pixels were written while the block sat in the cache.
//
// Blending is the premultiplied "over" operator. It is associative, which is
// what lets a pixel cache composite fragments on an empty block and the
// consistency test (C-test) later composite that block over the frame buffer:
// the colour is the same as if every fragment had been blended straight into the
// frame buffer. Depth compare is "less": 0 is nearest, all ones is far, and an
// empty pixel counts as far and transparent black.
//
// The pixel format, the 4x4 block size and the blend equation are choices of
// this design; the architecture only states that a C-test is a z-test and an
// alpha-blend per pixel.
package davidii_pkg;

  localparam int unsigned ZW      = 24;             // depth bits
  localparam int unsigned XW      = 11;             // screen x bits (up to 2047)
  localparam int unsigned YW      = 11;             // screen y bits
  localparam int unsigned BLK_DIM = 4;              // block is BLK_DIM x BLK_DIM pixels
  localparam int unsigned BLK_PIX = BLK_DIM * BLK_DIM;
  localparam int unsigned BADDR_W = 17;             // block address bits (1600x1200/16 = 120000 blocks)
  localparam int unsigned UVW     = 16;             // texture coordinate: 8 integer, 8 fraction bits

  localparam logic [ZW-1:0] Z_FAR = '1;

  typedef struct packed {
    logic [7:0] a;
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgba_t;

  typedef struct packed {
    logic [ZW-1:0] z;
    rgba_t         c;
  } pixel_t;

  localparam pixel_t PIXEL_EMPTY = '{z: Z_FAR, c: '0};

  // One block of pixels as stored in the frame buffer.
  typedef pixel_t [BLK_PIX-1:0] fb_block_t;

  // One block as held in a pixel cache line and sent to the MIU.
  typedef struct packed {
    logic [BLK_PIX-1:0] mask;   // pixel written since the line was allocated
    fb_block_t          pix;
  } cblock_t;

  typedef struct packed {
    logic [BADDR_W-1:0] addr;   // block address: (y/4)*blocks_per_row + x/4
    cblock_t            blk;
  } blk_xfer_t;

  // An interpolated fragment as delivered by the edge walk.
  typedef struct packed {
    logic [XW-1:0]  x;
    logic [YW-1:0]  y;
    logic [ZW-1:0]  z;
    rgba_t          c;          // not premultiplied
    logic [UVW-1:0] u;          // level-0 texel units, 8.8 fixed point
    logic [UVW-1:0] v;
    logic [3:0]     lod;        // mip level of the finer footprint
    logic [7:0]     lodf;       // weight of the next coarser level; 0 = bilinear only
  } fragment_t;

  // Per-rasterizer event pulses, brought out for performance counting.
  typedef struct packed {
    logic tex_miss;    // texel fetched into the texture cache
    logic alpha_rej;   // fragment discarded by the alpha test
    logic pc_hit;      // fragment hit in the pixel cache
    logic pc_miss;     // fragment missed; line reallocated without a refill
    logic pc_evict;    // the miss also sent a written victim block to the MIU
    logic pc_stall;    // miss waiting because the MIU could not take the victim
    logic zfail;       // fragment failed the z-test in the pixel cache
  } rast_ev_t;

  // a*b/255 rounded to nearest, exact for 8-bit operands.
  function automatic logic [7:0] mul8(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    logic [16:0] t;
    p = a * b;
    t = 17'(p) + 17'd128;
    t = t + (t >> 8);
    return t[15:8];
  endfunction

  // Premultiplied "over": src composited on top of dst.
  function automatic rgba_t over(input rgba_t src, input rgba_t dst);
    logic [7:0] k;
    rgba_t      o;
    k   = 8'd255 - src.a;
    o.a = src.a + mul8(dst.a, k);
    o.r = src.r + mul8(dst.r, k);
    o.g = src.g + mul8(dst.g, k);
    o.b = src.b + mul8(dst.b, k);
    return o;
  endfunction

endpackage
