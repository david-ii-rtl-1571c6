// ctest_unit: the C-test ALUs between the MIU and the frame buffer.
//
// For each block leaving the pixel output queue it reads the frame-buffer block
// at the same address, runs the C-test (z-test and alpha-blend, ctest_alu) of
// every pixel the rasterizer wrote, NUM_CTEST_ALUS pixels per cycle, and writes
// the merged block back. This is what keeps the frame buffer consistent although
// several rasterizers may have cached and modified the same block.
//
// Timing: a block is taken (in_valid and in_ready) in cycle 0, when the
// frame-buffer read is also made and the first group of pixels is tested; group
// k is tested in cycle k; the block is written at the end of cycle
// CTEST_CYCLES-1, and the next block can be taken in the cycle after, so the
// unit retires exactly one block every CTEST_CYCLES cycles. Because the write
// lands before the next read, two blocks for the same address in a row are
// merged correctly. CTEST_CYCLES must be at least 16/NUM_CTEST_ALUS; cycles
// beyond that model a slower frame-buffer access. enable low (frame-buffer
// clear) holds off new blocks.
//
// CTEST_CYCLES defaults to 8 for the embedded frame buffer (16 and 12 model
// the conventional-DRAM and C-RAM memory systems). The two ALUs that make 8
// cycles possible for a 16-pixel block are this design's choice.
module ctest_unit
  import davidii_pkg::*;
#(
  parameter int unsigned CTEST_CYCLES   = 8,
  parameter int unsigned NUM_CTEST_ALUS = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               in_valid,
  output logic               in_ready,
  input  blk_xfer_t          in_blk,
  output logic [BADDR_W-1:0] fb_rd_addr,
  input  fb_block_t          fb_rd_data,
  output logic               fb_we,
  output logic [BADDR_W-1:0] fb_wr_addr,
  output fb_block_t          fb_wr_data,
  output logic               busy,
  output logic               ev_block,   // block written back
  output logic               ev_pass,    // some pixel passed its C-test this cycle
  output logic               ev_fail     // some written pixel failed its z-test this cycle
);

  localparam int unsigned GROUPS = BLK_PIX / NUM_CTEST_ALUS;
  localparam int unsigned CW     = $clog2(CTEST_CYCLES > 1 ? CTEST_CYCLES : 2);

  initial begin
    assert (CTEST_CYCLES >= GROUPS && BLK_PIX % NUM_CTEST_ALUS == 0)
      else $error("ctest_unit: CTEST_CYCLES too small for NUM_CTEST_ALUS");
  end

  logic               active;
  logic [CW-1:0]      cnt;
  cblock_t            src_q;
  fb_block_t          work_q;
  logic [BADDR_W-1:0] addr_q;

  logic               start, last;
  logic [CW-1:0]      grp;
  cblock_t            cur_src;
  fb_block_t          cur_dst, work_n;
  pixel_t             a_src [NUM_CTEST_ALUS];
  pixel_t             a_dst [NUM_CTEST_ALUS];
  pixel_t             a_res [NUM_CTEST_ALUS];
  logic [NUM_CTEST_ALUS-1:0] a_pass, a_used;

  assign in_ready   = enable && !active;
  assign start      = in_valid && in_ready;
  assign fb_rd_addr = in_blk.addr;
  assign busy       = active;

  always_comb begin
    cur_src = active ? src_q  : in_blk.blk;
    cur_dst = active ? work_q : fb_rd_data;
    grp     = active ? cnt : '0;
    last    = (int'(grp) == CTEST_CYCLES - 1);
    for (int a = 0; a < NUM_CTEST_ALUS; a++) begin
      int unsigned p;
      p = (int'(grp) * NUM_CTEST_ALUS + a) % BLK_PIX;
      a_src[a]  = cur_src.pix[p];
      a_dst[a]  = cur_dst[p];
      a_used[a] = (int'(grp) < GROUPS) && cur_src.mask[p];
    end
  end

  for (genvar a = 0; a < NUM_CTEST_ALUS; a++) begin : g_alu
    ctest_alu u_alu (.src(a_src[a]), .dst(a_dst[a]), .pass(a_pass[a]), .result(a_res[a]));
  end

  always_comb begin
    work_n = cur_dst;
    for (int a = 0; a < NUM_CTEST_ALUS; a++) begin
      int unsigned p;
      p = (int'(grp) * NUM_CTEST_ALUS + a) % BLK_PIX;
      if (a_used[a] && a_pass[a]) work_n[p] = a_res[a];
    end
  end

  assign fb_we      = (start || active) && last;
  assign fb_wr_addr = active ? addr_q : in_blk.addr;
  assign fb_wr_data = work_n;
  assign ev_block   = fb_we;
  assign ev_pass    = (start || active) && |(a_used & a_pass);
  assign ev_fail    = (start || active) && |(a_used & ~a_pass);

  always_ff @(posedge clk) begin
    if (start) begin
      src_q  <= in_blk.blk;
      addr_q <= in_blk.addr;
    end
    if (start || active) work_q <= work_n;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      cnt    <= '0;
    end else if (active) begin
      if (last) active <= 1'b0;
      cnt <= cnt + 1'b1;
    end else if (start && !last) begin
      active <= 1'b1;
      cnt    <= CW'(1);
    end
  end

endmodule
