// pixel_cache: a rasterizer's local pixel cache (depth cache + colour cache)
// with the z-test and alpha-blend stages of the pixel pipeline.
//
// Each line holds one 4x4-pixel block: depth and premultiplied colour per pixel
// and a mask of the pixels written since the line was allocated. The cache is
// direct mapped on the block address (y/4)*BLOCKS_X + x/4: the low bits pick the
// line, the rest is the tag.
//
// The cache never reads the frame buffer. On a miss, the victim block, if any of
// its pixels was written, is handed to the MIU (out_valid/out_blk) and, in the
// same cycle the MIU takes it, the line is reallocated as an empty block and the
// fragment is processed into it. A fragment therefore costs one cycle whether it
// hits or misses; the cache stalls (in_ready low) only while the MIU cannot
// accept the victim, i.e. while its pixel output queue is full. Consistency with
// other rasterizers is restored later, when the MIU's C-test ALUs merge each
// evicted block into the frame buffer.
//
// Per fragment (one per cycle): read the pixel (an unwritten pixel reads as far
// depth, transparent black), z-test it, and if it passes write the new depth and
// the colour blended over the old one (ctest_alu). A failing fragment changes
// nothing.
//
// flush (a pulse, given while no fragment is offered) walks every line, sends
// each written block to the MIU and empties the line; flush_busy is high until
// the walk ends, PC_LINES cycles plus any wait for the MIU.
//
// Evict-on-miss without a refill, stalling only on a full queue, and the
// end-of-frame flush follow the architecture. Line count, direct mapping and the
// per-pixel mask are this design's choices.
module pixel_cache
  import davidii_pkg::*;
#(
  parameter int unsigned PC_LINES = 64,
  parameter int unsigned BLOCKS_X = 400
) (
  input  logic          clk,
  input  logic          rst_n,
  // fragment after texturing and alpha test
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic [ZW-1:0] in_z,
  input  rgba_t         in_c,        // premultiplied
  // replaced blocks to the MIU
  output logic          out_valid,
  input  logic          out_ready,
  output blk_xfer_t     out_blk,
  // end of frame
  input  logic          flush,
  output logic          flush_busy,
  // events, one pulse per fragment or block
  output logic          ev_hit,
  output logic          ev_miss,
  output logic          ev_evict,
  output logic          ev_stall,
  output logic          ev_zfail
);

  localparam int unsigned IW = $clog2(PC_LINES);
  localparam int unsigned TW = BADDR_W - IW;

  logic [TW-1:0] tag_q  [PC_LINES];
  logic          lval_q [PC_LINES];
  cblock_t       blk_q  [PC_LINES];

  logic [BADDR_W-1:0]         baddr;
  logic [IW-1:0]              idx;
  logic [TW-1:0]              tag;
  logic [$clog2(BLK_PIX)-1:0] pi;
  logic                       hit, victim_dirty;
  cblock_t                    cur, nxt;
  pixel_t                     src, dst, res;
  logic                       pass;

  logic          flushing;
  logic [IW-1:0] fidx;
  logic          f_dirty;

  ctest_alu u_alu (.src(src), .dst(dst), .pass(pass), .result(res));

  always_comb begin
    baddr = BADDR_W'((32'(in_y) >> 2) * BLOCKS_X + (32'(in_x) >> 2));
    idx   = baddr[IW-1:0];
    tag   = baddr[BADDR_W-1:IW];
    pi    = {in_y[1:0], in_x[1:0]};
    hit   = lval_q[idx] && (tag_q[idx] == tag);
    victim_dirty = lval_q[idx] && !hit && (|blk_q[idx].mask);
    if (hit) cur = blk_q[idx];
    else     cur = '{mask: '0, pix: {BLK_PIX{PIXEL_EMPTY}}};
    src   = '{z: in_z, c: in_c};
    dst   = cur.mask[pi] ? cur.pix[pi] : PIXEL_EMPTY;
    f_dirty = lval_q[fidx] && (|blk_q[fidx].mask);
  end

  always_comb begin
    nxt   = cur;
    if (pass) begin
      nxt.pix[pi]  = res;
      nxt.mask[pi] = 1'b1;
    end
  end

  always_comb begin
    if (flushing) begin
      in_ready  = 1'b0;
      out_valid = f_dirty;
      out_blk   = '{addr: {tag_q[fidx], fidx}, blk: blk_q[fidx]};
    end else begin
      in_ready  = !(victim_dirty && !out_ready);
      out_valid = in_valid && victim_dirty;
      out_blk   = '{addr: {tag_q[idx], idx}, blk: blk_q[idx]};
    end
  end

  wire accept = in_valid && in_ready;
  wire f_step = flushing && (!f_dirty || out_ready);

  assign flush_busy = flushing;
  assign ev_hit   = accept && hit;
  assign ev_miss  = accept && !hit;
  assign ev_evict = accept && victim_dirty;
  assign ev_stall = !flushing && in_valid && victim_dirty && !out_ready;
  assign ev_zfail = accept && !pass;

  always_ff @(posedge clk) begin
    if (accept) begin
      blk_q[idx] <= nxt;
      tag_q[idx] <= tag;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < PC_LINES; i++) lval_q[i] <= 1'b0;
      flushing <= 1'b0;
      fidx     <= '0;
    end else if (flushing) begin
      if (f_step) begin
        lval_q[fidx] <= 1'b0;
        fidx         <= fidx + 1'b1;
        if (int'(fidx) == PC_LINES - 1) flushing <= 1'b0;
      end
    end else begin
      if (accept) lval_q[idx] <= 1'b1;
      if (flush) begin
        flushing <= 1'b1;
        fidx     <= '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(flush && in_valid))
    else $error("pixel_cache: flush while a fragment is offered");

endmodule
