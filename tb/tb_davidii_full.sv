// tb_davidii_full: one complete frame on the rendering processor at its
// default size: 16 rasterizers, 1600x1200 screen, 256x256 mip-mapped texture, 64-line
// caches, 128-entry pixel output queue, 8-cycle C-test. A texture is loaded,
// the frame buffer cleared, overlapping textured rectangles are dealt round
// robin to the rasterizers inside a 512x256 window, the caches are flushed and
// the whole frame buffer is compared with a frame computed directly from the
// fragments. Event counts as in the reduced end-to-end test.
module tb_davidii_full;
  import davidii_pkg::*;
  import tb_ref_pkg::*;
  localparam int NR = 16, SW = 1600, SH = 1200, TL = 8, OQ = 128;
  localparam int NPRIM = 400, PMAX = 40, RX0 = 600, RY0 = 500, RW = 512, RH = 256;
  localparam int WATCHDOG = 2000000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int BX = SW / 4, NBLK = BX * (SH / 4), TEXN = ((1 << (2 * TL + 2)) - 1) / 3;

  logic rst_n, flush, tex_wr_en, tex_invalidate, fb_clear, fb_clear_busy, idle;
  logic ev_oq_full, ev_ctest_block, ev_ctest_pass, ev_ctest_fail;
  logic [NR-1:0] frag_valid, frag_ready, flush_busy;
  fragment_t [NR-1:0] frag;
  logic [7:0] alpha_ref;
  logic [2*TL:0] tex_wr_addr;
  logic [31:0] tex_wr_data;
  logic [BADDR_W-1:0] disp_addr;
  fb_block_t disp_data;
  rast_ev_t [NR-1:0] ev;
  logic [$clog2(OQ+1)-1:0] oq_count;

  davidii_top dut (
    .clk, .rst_n, .frag_valid, .frag_ready, .frag, .alpha_ref, .flush, .flush_busy, .tex_wr_en,
    .tex_wr_addr, .tex_wr_data, .tex_invalidate, .fb_clear, .fb_clear_busy, .disp_addr, .disp_data,
    .ev, .ev_oq_full, .ev_ctest_block, .ev_ctest_pass, .ev_ctest_fail, .oq_count, .idle);

  logic [31:0] tex [TEXN];
  logic [55:0] direct [NBLK][16];
  fragment_t fq [NR][$];
  longint n_tex = 0, n_arej = 0, n_hit = 0, n_miss = 0, n_evict = 0, n_stall = 0, n_zfail = 0;
  longint n_full = 0, n_blocks = 0, n_cpass = 0, n_cfail = 0, n_flush_blocks = 0, n_shared = 0;
  logic in_flush = 1'b0;
  int cycle = 0;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int r = 0; r < NR; r++) begin
      n_tex += longint'(ev[r].tex_miss); n_arej += longint'(ev[r].alpha_rej); n_hit += longint'(ev[r].pc_hit);
      n_miss += longint'(ev[r].pc_miss); n_evict += longint'(ev[r].pc_evict);
      n_stall += longint'(ev[r].pc_stall); n_zfail += longint'(ev[r].zfail);
    end
    n_full += longint'(ev_oq_full); n_blocks += longint'(ev_ctest_block);
    n_cpass += longint'(ev_ctest_pass); n_cfail += longint'(ev_ctest_fail);
    if (in_flush) n_flush_blocks += longint'(ev_ctest_block);
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

  function automatic logic [55:0] ctest(input logic [55:0] s, input logic [55:0] d);
    if (s[55:32] < d[55:32]) return {s[55:32], ref_over(s[31:0], d[31:0])};
    return d;
  endfunction

  task automatic reference(input fragment_t f);
    int baddr, pi;
    logic [31:0] c;
    c = ref_modulate_pm(tex_colour(f), f.c);
    if (c[31:24] < alpha_ref) return;
    baddr = (int'(f.y) / 4) * BX + int'(f.x) / 4; pi = (int'(f.y) % 4) * 4 + int'(f.x) % 4;
    direct[baddr][pi] = ctest({f.z, c}, direct[baddr][pi]);
  endtask

  initial begin
    int owner [];
    int total, pending;
    owner = new[NBLK];
    rst_n = 1'b0; flush = 1'b0; tex_wr_en = 1'b0; tex_invalidate = 1'b0; fb_clear = 1'b0;
    frag_valid = '0; frag = '0; alpha_ref = 8'd1; disp_addr = '0; tex_wr_addr = '0; tex_wr_data = '0;
    for (int b = 0; b < NBLK; b++) begin
      owner[b] = -1;
      for (int p = 0; p < 16; p++) direct[b][p] = {24'hffffff, 32'h0};
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // texture load: opaque texels of random colour
    for (int i = 0; i < TEXN; i++) begin
      @(negedge clk);
      tex[i] = {8'hff, 24'($urandom)};
      tex_wr_en = 1'b1; tex_wr_addr = (2*TL+1)'(i); tex_wr_data = tex[i];
    end
    @(negedge clk);
    tex_wr_en = 1'b0; tex_invalidate = 1'b1; fb_clear = 1'b1;
    @(negedge clk);
    tex_invalidate = 1'b0; fb_clear = 1'b0;
    while (fb_clear_busy) @(negedge clk);
    // primitives: rectangles of fragments with one depth each, dealt round robin
    total = 0;
    for (int k = 0; k < NPRIM; k++) begin
      int w, h, x0, y0, r;
      bit dbl;
      logic [ZW-1:0] z;
      logic [31:0] c;
      logic [15:0] u0, v0;
      fragment_t f;
      r = k % NR;
      w = $urandom_range(1, PMAX); h = $urandom_range(1, PMAX);
      x0 = RX0 + $urandom_range(0, RW - w); y0 = RY0 + $urandom_range(0, RH - h);
      z = ZW'($urandom_range(1, 24'hfffff0));
      c = {(($urandom_range(0, 9) == 0) ? 8'h00 : 8'hff), 24'($urandom)};
      u0 = 16'($urandom); v0 = 16'($urandom);
      f.lod = 4'($urandom_range(0, TL));
      f.lodf = ($urandom_range(0, 1) == 0) ? 8'd0 : 8'($urandom);
      // every tenth primitive is drawn twice, the second time slightly
      // behind, so its fragments fail the z-test in the pixel cache
      dbl = (k % 10 == 3);
      if (dbl) z = z >> 1;
      for (int pass = 0; pass < (dbl ? 2 : 1); pass++)
      for (int yy = y0; yy < y0 + h; yy++)
        for (int xx = x0; xx < x0 + w; xx++) begin
          int b;
          f.x = XW'(xx); f.y = YW'(yy); f.z = z + ZW'(xx - x0) + ZW'(pass * 8); f.c = c;
          f.u = u0 + 16'((xx - x0) * 300); f.v = v0 + 16'((yy - y0) * 300);
          fq[r].push_back(f);
          reference(f);
          b = (yy / 4) * BX + xx / 4;
          if (owner[b] == -1) owner[b] = r;
          else if (owner[b] != r && owner[b] >= 0) begin owner[b] = -2; n_shared++; end
          total++;
        end
    end
    $display("%0d primitives, %0d fragments, %0d blocks touched by several rasterizers", NPRIM, total, n_shared);
    // stream the fragments
    pending = total;
    while (pending > 0) begin
      logic [NR-1:0] acc;
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        frag_valid[r] = fq[r].size() > 0;
        if (fq[r].size() > 0) frag[r] = fq[r][0];
      end
      #1;
      acc = frag_valid & frag_ready;
      @(posedge clk);
      #1;
      for (int r = 0; r < NR; r++)
        if (acc[r]) begin void'(fq[r].pop_front()); pending--; end
    end
    @(negedge clk);
    frag_valid = '0;
    $display("fragments sent by cycle %0d", cycle);
    // end of frame
    repeat (5) @(negedge clk);
    flush = 1'b1; in_flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    @(negedge clk);
    while (!idle) @(negedge clk);
    $display("frame done at cycle %0d", cycle);
    // read out and compare the whole frame buffer
    for (int b = 0; b < NBLK; b++) begin
      disp_addr = BADDR_W'(b);
      #1;
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (disp_data[p] !== direct[b][p]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d pixel %0d got %h exp %h", b, p, disp_data[p], direct[b][p]);
        end
      end
    end
    $display("tex_miss %0d alpha_rej %0d pc_hit %0d pc_miss %0d pc_evict %0d pc_stall %0d zfail %0d",
             n_tex, n_arej, n_hit, n_miss, n_evict, n_stall, n_zfail);
    $display("queue_full %0d ctest_blocks %0d ctest_pass %0d ctest_fail %0d flush_blocks %0d",
             n_full, n_blocks, n_cpass, n_cfail, n_flush_blocks);
    begin
      longint ev_counts [11];
      string  ev_names [11];
      ev_counts = '{n_tex, n_arej, n_hit, n_miss, n_evict, n_stall, n_zfail, n_full, n_cpass, n_cfail, n_flush_blocks};
      ev_names  = '{"texture miss", "alpha reject", "pixel-cache hit", "pixel-cache miss", "eviction",
                    "stall on full queue", "z-test fail in cache", "queue full", "C-test pass",
                    "C-test fail", "flush write-back"};
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (ev_counts[i] == 0) begin failures++; $display("FAIL %s never happened", ev_names[i]); end
      end
      checks++;
      if (n_shared == 0) begin failures++; $display("FAIL no block shared between rasterizers"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
