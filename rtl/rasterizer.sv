// rasterizer: one rasterizer's pixel pipeline with its local texture cache and
// local pixel cache.
//
// Fragments (position, depth, colour, texture coordinate in 8.8 level-0 texel
// units, mip level lod and level fraction lodf) flow through three registered
// stages with valid/ready handshakes:
//   S1  texture read: at level L the coordinate is u>>L, v>>L; the 2x2
//       footprint at its integer part is looked up in the texture cache. A
//       trilinear fragment (lodf != 0 and lod below the last level) makes two
//       lookups, levels lod and lod+1, in two cycles; the first footprint is held
//       meanwhile. The stage waits here while the cache refills.
//   S2  texture filter (four texels, or eight when trilinear), texture blend
//       (modulate, premultiply) and alpha test against alpha_ref; a rejected
//       fragment is dropped here.
//   S3  pixel cache: z read, z-test, z write, colour read, blend, colour write,
//       one fragment per cycle. A miss hands the victim block to the MIU and
//       goes on at once; S3 waits only while the MIU cannot take it.
// With all hits the pipeline takes one bilinear fragment per cycle (one
// trilinear fragment per two cycles), three cycles from acceptance to the
// pixel-cache write.
//
// flush (a pulse at end of frame) waits until the pipeline is empty and then
// has the pixel cache write back all written blocks; flush_busy stays high until
// that is done and no fragment is accepted meanwhile. idle is high when no
// fragment is in flight and no flush is pending.
//
// Stage order follows the architecture's pixel rasterization pipeline; where
// the pipeline registers sit is this design's choice.
module rasterizer
  import davidii_pkg::*;
#(
  parameter int unsigned TEX_LOG  = 8,
  parameter int unsigned TC_LINES = 64,
  parameter int unsigned PC_LINES = 64,
  parameter int unsigned BLOCKS_X = 400
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frag_valid,
  output logic                 frag_ready,
  input  fragment_t            frag,
  input  logic [7:0]           alpha_ref,
  input  logic                 tex_invalidate,
  // texture memory port
  output logic                 tm_req,
  output logic [2*TEX_LOG:0]   tm_addr,
  input  logic                 tm_gnt,
  input  logic                 tm_rvalid,
  input  logic [31:0]          tm_rdata,
  // replaced blocks to the MIU
  output logic                 blk_valid,
  input  logic                 blk_ready,
  output blk_xfer_t            blk,
  // end of frame
  input  logic                 flush,
  output logic                 flush_busy,
  output logic                 idle,
  output rast_ev_t             ev
);

  // S1: texture read
  logic      s1_v;
  fragment_t s1;
  // S2: filter, blend, alpha test
  logic      s2_v;
  logic [XW-1:0] s2_x;
  logic [YW-1:0] s2_y;
  logic [ZW-1:0] s2_z;
  rgba_t     s2_c;
  logic [7:0] s2_afu, s2_afv, s2_bfu, s2_bfv, s2_lodf;
  rgba_t     s2_a00, s2_a10, s2_a01, s2_a11;
  rgba_t     s2_b00, s2_b10, s2_b01, s2_b11;
  // S1 trilinear: second lookup pending, first footprint held
  logic      s1_phase;
  logic      s1_tri;
  logic [3:0] lk_level;
  logic [UVW-1:0] lu, lv;
  rgba_t     h00, h10, h01, h11;
  logic [7:0] hfu, hfv;
  // S3: pixel cache
  logic      s3_v;
  logic [XW-1:0] s3_x;
  logic [YW-1:0] s3_y;
  logic [ZW-1:0] s3_z;
  rgba_t     s3_c;

  logic  tc_hit;
  rgba_t t00, t10, t01, t11;
  rgba_t filt, blended;
  logic  apass;
  logic  pc_ready, pc_flush_busy;
  logic  flush_pend, pc_flush;
  logic  pc_hit, pc_miss, pc_evict, pc_stall, pc_zfail, tc_miss;

  wire s3_adv = s3_v && pc_ready;
  wire s2_adv = s2_v && (!s3_v || s3_adv);
  wire s1_adv = s1_v && tc_hit && (!s1_tri || s1_phase) && (!s2_v || s2_adv);

  always_comb begin
    s1_tri   = (s1.lodf != 8'd0) && (int'(s1.lod) < TEX_LOG);
    lk_level = s1.lod + 4'(s1_phase);
    lu       = s1.u >> lk_level;
    lv       = s1.v >> lk_level;
  end
  assign frag_ready = !flush_pend && !pc_flush_busy && (!s1_v || s1_adv);

  tex_cache #(.TEX_LOG(TEX_LOG), .TC_LINES(TC_LINES)) u_tc (
    .clk, .rst_n, .invalidate(tex_invalidate),
    .lk_valid(s1_v), .lk_level, .lk_u(lu[8 +: TEX_LOG]), .lk_v(lv[8 +: TEX_LOG]),
    .lk_hit(tc_hit), .t00, .t10, .t01, .t11,
    .mem_req(tm_req), .mem_addr(tm_addr), .mem_gnt(tm_gnt),
    .mem_rvalid(tm_rvalid), .mem_rdata(tm_rdata), .ev_miss(tc_miss));

  tex_filter u_filt (.a00(s2_a00), .a10(s2_a10), .a01(s2_a01), .a11(s2_a11), .afu(s2_afu), .afv(s2_afv),
                     .b00(s2_b00), .b10(s2_b10), .b01(s2_b01), .b11(s2_b11), .bfu(s2_bfu), .bfv(s2_bfv),
                     .lodf(s2_lodf), .out(filt));
  tex_blend  u_blend (.texel(filt), .frag_c(s2_c), .out_pm(blended));
  alpha_test u_atest (.alpha(blended.a), .ref_alpha(alpha_ref), .pass(apass));

  pixel_cache #(.PC_LINES(PC_LINES), .BLOCKS_X(BLOCKS_X)) u_pc (
    .clk, .rst_n,
    .in_valid(s3_v), .in_ready(pc_ready), .in_x(s3_x), .in_y(s3_y), .in_z(s3_z), .in_c(s3_c),
    .out_valid(blk_valid), .out_ready(blk_ready), .out_blk(blk),
    .flush(pc_flush), .flush_busy(pc_flush_busy),
    .ev_hit(pc_hit), .ev_miss(pc_miss), .ev_evict(pc_evict), .ev_stall(pc_stall), .ev_zfail(pc_zfail));

  assign pc_flush   = flush_pend && !s1_v && !s2_v && !s3_v;
  assign flush_busy = flush_pend || pc_flush_busy;
  assign idle       = !s1_v && !s2_v && !s3_v && !flush_busy;

  always_comb begin
    ev.tex_miss  = tc_miss;
    ev.alpha_rej = s2_adv && !apass;
    ev.pc_hit    = pc_hit;
    ev.pc_miss   = pc_miss;
    ev.pc_evict  = pc_evict;
    ev.pc_stall  = pc_stall;
    ev.zfail     = pc_zfail;
  end

  always_ff @(posedge clk) begin
    if (frag_valid && frag_ready) s1 <= frag;
    if (s1_v && tc_hit && !s1_phase) begin
      h00 <= t00; h10 <= t10; h01 <= t01; h11 <= t11;
      hfu <= lu[7:0]; hfv <= lv[7:0];
    end
    if (s1_adv) begin
      s2_x <= s1.x;  s2_y <= s1.y;  s2_z <= s1.z;  s2_c <= s1.c;
      s2_b00 <= t00; s2_b10 <= t10; s2_b01 <= t01; s2_b11 <= t11;
      s2_bfu <= lu[7:0]; s2_bfv <= lv[7:0];
      if (s1_tri) begin
        s2_a00 <= h00; s2_a10 <= h10; s2_a01 <= h01; s2_a11 <= h11;
        s2_afu <= hfu; s2_afv <= hfv; s2_lodf <= s1.lodf;
      end else begin
        s2_a00 <= t00; s2_a10 <= t10; s2_a01 <= t01; s2_a11 <= t11;
        s2_afu <= lu[7:0]; s2_afv <= lv[7:0]; s2_lodf <= 8'd0;
      end
    end
    if (s2_adv) begin
      s3_x <= s2_x;  s3_y <= s2_y;  s3_z <= s2_z;  s3_c <= blended;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v       <= 1'b0;
      s1_phase   <= 1'b0;
      s2_v       <= 1'b0;
      s3_v       <= 1'b0;
      flush_pend <= 1'b0;
    end else begin
      if (frag_valid && frag_ready) s1_v <= 1'b1;
      else if (s1_adv)              s1_v <= 1'b0;
      if (s1_adv)                                 s1_phase <= 1'b0;
      else if (s1_v && tc_hit && s1_tri && !s1_phase) s1_phase <= 1'b1;
      if (s1_adv)      s2_v <= 1'b1;
      else if (s2_adv) s2_v <= 1'b0;
      if (s2_adv)      s3_v <= apass;
      else if (s3_adv) s3_v <= 1'b0;
      if (flush)         flush_pend <= 1'b1;
      else if (pc_flush) flush_pend <= 1'b0;
    end
  end

endmodule
