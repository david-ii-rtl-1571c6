// miu: memory interface unit, write side of the pixel caches.
//
// Every rasterizer offers its replaced (or flushed) pixel-cache blocks on
// in_valid/in_blk. A round-robin arbiter takes one block per cycle into the
// pixel output queue, as long as the queue is not full; in_ready tells the
// chosen rasterizer its block was taken. The queue head is offered to the
// C-test unit on out_valid/out_blk and retired by out_ready. A rasterizer whose
// block is not taken stalls, so the queue is what hides the frame-buffer
// latency from the rasterizers: they only wait when it is full or when several
// replace blocks in the same cycle.
//
// ev_full pulses in each cycle a block is refused because the queue is full;
// count is the queue occupancy. The pixel output queue with head and tail
// pointers follows the architecture; round-robin intake is this design's
// choice.
module miu
  import davidii_pkg::*;
#(
  parameter int unsigned NUM_RAST = 16,
  parameter int unsigned OQ_DEPTH = 128
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic      [NUM_RAST-1:0]      in_valid,
  output logic      [NUM_RAST-1:0]      in_ready,
  input  blk_xfer_t [NUM_RAST-1:0]      in_blk,
  output logic                          out_valid,
  input  logic                          out_ready,
  output blk_xfer_t                     out_blk,
  output logic [$clog2(OQ_DEPTH+1)-1:0] count,
  output logic                          ev_full
);

  localparam int unsigned IW = $clog2(NUM_RAST > 1 ? NUM_RAST : 2);

  logic [NUM_RAST-1:0] gnt;
  logic [IW-1:0]       gnt_idx;
  logic                empty, full, push, pop;

  rr_arbiter #(.N(NUM_RAST)) u_arb (
    .clk, .rst_n, .req(in_valid), .adv(push), .gnt, .gnt_idx);

  assign push      = (|in_valid) && !full;
  assign in_ready  = full ? '0 : gnt;
  assign out_valid = !empty;
  assign pop       = out_valid && out_ready;
  assign ev_full   = (|in_valid) && full;

  pixel_output_queue #(.DEPTH(OQ_DEPTH), .W($bits(blk_xfer_t))) u_q (
    .clk, .rst_n, .push, .push_data(in_blk[gnt_idx]), .pop,
    .head_data(out_blk), .empty, .full, .count);

endmodule
