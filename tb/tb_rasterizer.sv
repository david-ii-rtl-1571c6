// tb_rasterizer: one rasterizer on a 32x16 screen with a mip-mapped 16x16 texture, small
// texture and pixel caches, a texture-memory model and a block sink that is
// randomly not ready. Opaque textured fragments at random positions and depths
// (some fully transparent, to be removed by the alpha test) are rendered, the
// cache is flushed, and the blocks it sent are merged with the reference C-test;
// the result must equal the frame computed directly from the fragments with the
// reference filter (bilinear or trilinear, random mip levels), blend and
// z-test. Also checks one bilinear fragment per cycle once the texture cache is
// warm and the sink is ready.
module tb_rasterizer;
  import davidii_pkg::*;
  import tb_ref_pkg::*;
  localparam int TL = 4, BX = 8, NBLK = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, frag_valid, frag_ready, tex_invalidate, tm_req, tm_gnt, tm_rvalid;
  logic blk_valid, blk_ready, flush, flush_busy, idle;
  fragment_t frag;
  logic [7:0] alpha_ref;
  logic [2*TL:0] tm_addr;
  logic [31:0] tm_rdata;
  blk_xfer_t blk;
  rast_ev_t ev;

  rasterizer #(.TEX_LOG(TL), .TC_LINES(4), .PC_LINES(4), .BLOCKS_X(BX)) dut (.clk, .rst_n,
    .frag_valid, .frag_ready, .frag, .alpha_ref, .tex_invalidate, .tm_req, .tm_addr, .tm_gnt,
    .tm_rvalid, .tm_rdata, .blk_valid, .blk_ready, .blk, .flush, .flush_busy, .idle, .ev);

  logic [31:0] tex [341];
  logic [55:0] fb [NBLK][16];
  logic [55:0] direct [NBLK][16];
  int n_tex = 0, n_arej = 0, n_hit = 0, n_miss = 0, n_evict = 0, n_stall = 0, n_zfail = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // texture memory model: grant at once, data one cycle later
  always @(posedge clk) begin
    tm_rvalid <= rst_n && tm_gnt;
    if (tm_gnt) tm_rdata <= tex[tm_addr];
  end
  assign tm_gnt = tm_req && !tm_rvalid;

  function automatic logic [55:0] ctest(input logic [55:0] s, input logic [55:0] d);
    if (s[55:32] < d[55:32]) return {s[55:32], ref_over(s[31:0], d[31:0])};
    return d;
  endfunction

  // block sink and event counters, sampled before the clock edge
  always @(negedge clk) begin
    blk_ready <= ($urandom_range(0, 3) != 0) || force_ready;
  end
  logic force_ready = 1'b0;
  always @(posedge clk) begin
    if (blk_valid && blk_ready)
      for (int p = 0; p < 16; p++)
        if (blk.blk.mask[p]) fb[blk.addr][p] = ctest(blk.blk.pix[p], fb[blk.addr][p]);
    n_tex += int'(ev.tex_miss); n_arej += int'(ev.alpha_rej); n_hit += int'(ev.pc_hit);
    n_miss += int'(ev.pc_miss); n_evict += int'(ev.pc_evict); n_stall += int'(ev.pc_stall); n_zfail += int'(ev.zfail);
  end

  function automatic logic [31:0] tx(input int l, input int u, input int v);
    int m;
    m = (1 << (TL - l)) - 1;
    return tex[ref_level_base(TL, l) + ((v & m) << (TL - l)) + (u & m)];
  endfunction

  function automatic logic [31:0] sample(input int l, input logic [15:0] u, input logic [15:0] v);
    int uu, vv, ui, vi;
    uu = int'(u) >> l; vv = int'(v) >> l; ui = uu >> 8; vi = vv >> 8;
    return ref_bilin(tx(l, ui, vi), tx(l, ui + 1, vi), tx(l, ui, vi + 1), tx(l, ui + 1, vi + 1), uu & 255, vv & 255);
  endfunction

  function automatic logic [31:0] tex_colour(input fragment_t f);
    if (f.lodf != 0 && int'(f.lod) < TL)
      return ref_lerp(sample(int'(f.lod), f.u, f.v), sample(int'(f.lod) + 1, f.u, f.v), int'(f.lodf));
    return sample(int'(f.lod), f.u, f.v);
  endfunction

  task automatic send(input fragment_t f);
    @(negedge clk);
    frag_valid = 1'b1; frag = f;
    #1;
    while (!frag_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 frag_valid = 1'b0;
  endtask

  task automatic reference(input fragment_t f);
    int baddr, pi;
    logic [31:0] c;
    c = ref_modulate_pm(tex_colour(f), f.c);
    if (c[31:24] < alpha_ref) return;
    baddr = (int'(f.y) / 4) * BX + int'(f.x) / 4; pi = (int'(f.y) % 4) * 4 + int'(f.x) % 4;
    direct[baddr][pi] = ctest({f.z, c}, direct[baddr][pi]);
  endtask

  function automatic fragment_t rand_frag();
    fragment_t f;
    f.x = XW'($urandom_range(0, 31)); f.y = YW'($urandom_range(0, 15));
    f.z = ZW'($urandom_range(0, 24'hfffffe));
    f.c = {(($urandom_range(0, 9) == 0) ? 8'h00 : 8'hff), 24'($urandom)};
    f.u = UVW'($urandom); f.v = UVW'($urandom);
    f.lod = 4'($urandom_range(0, TL));
    f.lodf = ($urandom_range(0, 2) == 0) ? 8'd0 : 8'($urandom);
    return f;
  endfunction

  initial begin
    int t0, t1;
    fragment_t f;
    for (int i = 0; i < 341; i++) tex[i] = {8'hff, 24'($urandom)};
    for (int b = 0; b < NBLK; b++) for (int p = 0; p < 16; p++) begin fb[b][p] = {24'hffffff, 32'h0}; direct[b][p] = fb[b][p]; end
    rst_n = 1'b0; frag_valid = 1'b0; frag = '0; alpha_ref = 8'd1; tex_invalidate = 1'b0; flush = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      f = rand_frag();
      send(f);
      reference(f);
    end
    // throughput: warm texture footprint, sink always ready, one block row
    force_ready = 1'b1;
    f = rand_frag(); f.u = 16'h0380; f.v = 16'h0540; f.c.a = 8'hff; f.lod = 4'd0; f.lodf = 8'd0;
    send(f); reference(f);
    repeat (30) @(negedge clk);
    t0 = -1;
    for (int i = 0; i < 100; i++) begin
      f.x = XW'(i % 4); f.y = YW'((i / 4) % 4); f.z = ZW'($urandom_range(0, 24'hfffffe));
      @(negedge clk);
      frag_valid = 1'b1; frag = f;
      #1;
      checks++;
      if (!frag_ready) begin failures++; $display("FAIL stalled at fragment %0d of a warm stream s1=%b hit=%b s2=%b s3=%b pcr=%b fp=%b", i, dut.s1_v, dut.tc_hit, dut.s2_v, dut.s3_v, dut.pc_ready, dut.flush_pend); end
      while (!frag_ready) begin @(negedge clk); #1; end
      reference(f);
    end
    @(negedge clk); frag_valid = 1'b0;
    force_ready = 1'b0;
    // end of frame
    repeat (5) @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    while (!idle) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (fb[b][p] !== direct[b][p]) begin failures++; $display("FAIL pixel %0d.%0d got %h exp %h", b, p, fb[b][p], direct[b][p]); end
      end
    checks++;
    if (n_tex == 0 || n_arej == 0 || n_hit == 0 || n_miss == 0 || n_evict == 0 || n_stall == 0 || n_zfail == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("tex_miss %0d alpha_rej %0d hit %0d miss %0d evict %0d stall %0d zfail %0d", n_tex, n_arej, n_hit, n_miss, n_evict, n_stall, n_zfail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
