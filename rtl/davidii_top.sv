// davidii_top: parallel rendering processor with per-rasterizer pixel caches and
// a consistency-tested frame buffer.
//
// NUM_RAST rasterizers work on different triangles at the same time, each with
// its own texture cache and pixel cache, and with no dependency checking between
// them: two rasterizers may hold and modify the same screen block in their
// caches. Consistency is restored where the blocks meet the single frame buffer.
// Whenever a pixel cache replaces a block (or is flushed at end of frame) the
// block goes to the memory interface unit (MIU), waits in the pixel output
// queue, and is merged into the frame buffer by the C-test ALUs, which z-test
// and blend every written pixel against the frame-buffer pixel. A pixel-cache
// miss never waits for the frame buffer: the rasterizer goes on as soon as the
// MIU has taken the victim, and stalls only when the queue is full.
//
// Memory system: the frame buffer and the C-test ALUs are on chip (the
// embedded-DRAM organisation), with one 896-bit block per frame-buffer word and
// CTEST_CYCLES = 8 cycles per block. Textures come from a shared texture memory
// that the texture caches reach through a round-robin arbiter.
//
// Interface:
//   frag_valid/frag_ready/frag  one fragment stream per rasterizer (the edge
//                               walk's output; the triangles are dealt to the
//                               rasterizers round robin by the driver);
//   alpha_ref                   alpha-test reference;
//   flush / flush_busy          end of frame: write every pixel cache back;
//   tex_wr_*, tex_invalidate    mip-mapped texture load (layout as in
//                               texture_memory) and texture-cache invalidate;
//   fb_clear / fb_clear_busy    clear the frame buffer (one block per cycle);
//   disp_addr / disp_data       read a frame-buffer block;
//   ev, ev_oq_full, ev_ctest_*  event pulses for performance counting;
//   oq_count                    pixel output queue occupancy;
//   idle                        nothing in flight anywhere.
// A frame is: fb_clear and wait, send fragments, flush, wait for idle, read out.
module davidii_top
  import davidii_pkg::*;
#(
  parameter int unsigned NUM_RAST       = 16,
  parameter int unsigned SCREEN_W       = 1600,
  parameter int unsigned SCREEN_H       = 1200,
  parameter int unsigned OQ_DEPTH       = 128,
  parameter int unsigned CTEST_CYCLES   = 8,
  parameter int unsigned NUM_CTEST_ALUS = 2,
  parameter int unsigned PC_LINES       = 64,
  parameter int unsigned TC_LINES       = 64,
  parameter int unsigned TEX_LOG        = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic      [NUM_RAST-1:0]      frag_valid,
  output logic      [NUM_RAST-1:0]      frag_ready,
  input  fragment_t [NUM_RAST-1:0]      frag,
  input  logic [7:0]                    alpha_ref,
  input  logic                          flush,
  output logic      [NUM_RAST-1:0]      flush_busy,
  input  logic                          tex_wr_en,
  input  logic [2*TEX_LOG:0]            tex_wr_addr,
  input  logic [31:0]                   tex_wr_data,
  input  logic                          tex_invalidate,
  input  logic                          fb_clear,
  output logic                          fb_clear_busy,
  input  logic [BADDR_W-1:0]            disp_addr,
  output fb_block_t                     disp_data,
  output rast_ev_t  [NUM_RAST-1:0]      ev,
  output logic                          ev_oq_full,
  output logic                          ev_ctest_block,
  output logic                          ev_ctest_pass,
  output logic                          ev_ctest_fail,
  output logic [$clog2(OQ_DEPTH+1)-1:0] oq_count,
  output logic                          idle
);

  localparam int unsigned BLOCKS_X   = SCREEN_W / BLK_DIM;
  localparam int unsigned NUM_BLOCKS = BLOCKS_X * (SCREEN_H / BLK_DIM);
  localparam int unsigned RW         = $clog2(NUM_RAST > 1 ? NUM_RAST : 2);

  // texture memory port of each rasterizer
  logic [NUM_RAST-1:0]      tm_req, tm_gnt, tm_rvalid;
  logic [2*TEX_LOG:0]       tm_addr [NUM_RAST];
  logic [31:0]              tm_rdata;
  logic [RW-1:0]            tm_idx, tm_idx_q;
  logic                     tm_rv_q;

  // block path
  logic      [NUM_RAST-1:0] blk_valid, blk_ready;
  blk_xfer_t [NUM_RAST-1:0] blk;
  logic                     oq_valid, oq_ready;
  blk_xfer_t                oq_blk;
  logic                     ct_busy;

  // frame buffer ports
  logic [BADDR_W-1:0]       fb_rd_addr, fb_wr_addr;
  fb_block_t                fb_rd_data, fb_wr_data;
  logic                     fb_we;

  logic [NUM_RAST-1:0]      r_idle;

  for (genvar r = 0; r < NUM_RAST; r++) begin : g_rast
    rasterizer #(
      .TEX_LOG(TEX_LOG), .TC_LINES(TC_LINES), .PC_LINES(PC_LINES), .BLOCKS_X(BLOCKS_X)
    ) u_rast (
      .clk, .rst_n,
      .frag_valid(frag_valid[r]), .frag_ready(frag_ready[r]), .frag(frag[r]),
      .alpha_ref, .tex_invalidate,
      .tm_req(tm_req[r]), .tm_addr(tm_addr[r]), .tm_gnt(tm_gnt[r]),
      .tm_rvalid(tm_rvalid[r]), .tm_rdata,
      .blk_valid(blk_valid[r]), .blk_ready(blk_ready[r]), .blk(blk[r]),
      .flush, .flush_busy(flush_busy[r]), .idle(r_idle[r]), .ev(ev[r]));
  end

  // Texture memory shared by the texture caches: one texel per cycle,
  // granted round robin, answered one cycle after the grant.
  rr_arbiter #(.N(NUM_RAST)) u_tm_arb (
    .clk, .rst_n, .req(tm_req), .adv(1'b1), .gnt(tm_gnt), .gnt_idx(tm_idx));

  texture_memory #(.TEX_LOG(TEX_LOG)) u_tm (
    .clk, .rd_en(|tm_gnt), .rd_addr(tm_addr[tm_idx]), .rd_data(tm_rdata),
    .wr_en(tex_wr_en), .wr_addr(tex_wr_addr), .wr_data(tex_wr_data));

  always_ff @(posedge clk) begin
    if (!rst_n) tm_rv_q <= 1'b0;
    else        tm_rv_q <= |tm_gnt;
    tm_idx_q <= tm_idx;
  end

  always_comb begin
    tm_rvalid = '0;
    tm_rvalid[tm_idx_q] = tm_rv_q;
  end

  miu #(.NUM_RAST(NUM_RAST), .OQ_DEPTH(OQ_DEPTH)) u_miu (
    .clk, .rst_n,
    .in_valid(blk_valid), .in_ready(blk_ready), .in_blk(blk),
    .out_valid(oq_valid), .out_ready(oq_ready), .out_blk(oq_blk),
    .count(oq_count), .ev_full(ev_oq_full));

  ctest_unit #(.CTEST_CYCLES(CTEST_CYCLES), .NUM_CTEST_ALUS(NUM_CTEST_ALUS)) u_ct (
    .clk, .rst_n, .enable(!fb_clear_busy),
    .in_valid(oq_valid), .in_ready(oq_ready), .in_blk(oq_blk),
    .fb_rd_addr, .fb_rd_data, .fb_we, .fb_wr_addr, .fb_wr_data,
    .busy(ct_busy), .ev_block(ev_ctest_block), .ev_pass(ev_ctest_pass), .ev_fail(ev_ctest_fail));

  frame_buffer #(.NUM_BLOCKS(NUM_BLOCKS)) u_fb (
    .clk, .rst_n,
    .rd_addr(fb_rd_addr), .rd_data(fb_rd_data),
    .we(fb_we), .wr_addr(fb_wr_addr), .wr_data(fb_wr_data),
    .disp_addr, .disp_data,
    .clear(fb_clear), .clear_busy(fb_clear_busy));

  assign idle = (&r_idle) && (oq_count == 0) && !ct_busy && !fb_clear_busy;

endmodule
