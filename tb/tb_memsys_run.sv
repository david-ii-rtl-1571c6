// tb_memsys_run: renders one fixed frame on a rendering processor of NR
// rasterizers with CT cycles per C-test block and measures how much of the
// pixel-cache miss latency is hidden.
//
// The frame (640x480 screen) is NPRIM textured rectangles scattered over a
// 128x96 window, about ten layers deep, generated by a fixed linear-congruential sequence so that every
// instance renders exactly the same frame, dealt round robin to its NR
// rasterizers. Each rectangle samples a single texel footprint, so after
// warm-up the texture caches always hit and only the pixel caches cost time,
// as in the latency study this reproduces. After the flush the whole frame
// buffer is compared with a frame computed directly from the fragments.
//
// Reported: fragments, evicting misses, stall cycles on a full pixel output
// queue (summed over the rasterizers), rendering cycles, and the latency
// reduction rate 1 - stalls / (evicting misses x CT), in per mille: 1000 means
// no miss waited, 0 that every evicting miss waited a full C-test time.
module tb_memsys_run
  import davidii_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int NR    = 4,
  parameter int CT    = 8,
  parameter int NPRIM = 600
) (
  input  logic   clk,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint n_frag,
  output longint n_evict,
  output longint n_stall,
  output longint n_cycles,
  output int     reduction_pm
);
  localparam int SW = 640, SH = 480, TL = 4, OQ = 128;
  localparam int RX0 = 256, RY0 = 192, RW = 128, RH = 96;   // window the rectangles fall in
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

  davidii_top #(.NUM_RAST(NR), .SCREEN_W(SW), .SCREEN_H(SH), .OQ_DEPTH(OQ), .CTEST_CYCLES(CT),
    .NUM_CTEST_ALUS(2), .PC_LINES(64), .TC_LINES(64), .TEX_LOG(TL)) dut (
    .clk, .rst_n, .frag_valid, .frag_ready, .frag, .alpha_ref, .flush, .flush_busy, .tex_wr_en,
    .tex_wr_addr, .tex_wr_data, .tex_invalidate, .fb_clear, .fb_clear_busy, .disp_addr, .disp_data,
    .ev, .ev_oq_full, .ev_ctest_block, .ev_ctest_pass, .ev_ctest_fail, .oq_count, .idle);

  logic [31:0] tex [TEXN];
  logic [55:0] direct [NBLK][16];
  fragment_t fq [NR][$];
  logic rendering = 1'b0;
  int unsigned lcg = 32'd12345;

  function automatic int unsigned next_rand(input int unsigned range);
    lcg = lcg * 32'd1103515245 + 32'd12345;
    return (lcg >> 8) % range;
  endfunction

  always @(posedge clk) begin
    if (rendering) begin
      n_cycles <= n_cycles + 1;
    end
  end

  longint ev_e, ev_s;
  always @(posedge clk) begin
    if (rendering) begin
      for (int r = 0; r < NR; r++) begin
        ev_e += longint'(ev[r].pc_evict);
        ev_s += longint'(ev[r].pc_stall);
      end
    end
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
    int pending;
    done = 1'b0; checks = 0; failures = 0; n_frag = 0; n_evict = 0; n_stall = 0; n_cycles = 0;
    reduction_pm = 0; ev_e = 0; ev_s = 0;
    rst_n = 1'b0; flush = 1'b0; tex_wr_en = 1'b0; tex_invalidate = 1'b0; fb_clear = 1'b0;
    frag_valid = '0; frag = '0; alpha_ref = 8'd0; disp_addr = '0; tex_wr_addr = '0; tex_wr_data = '0;
    for (int b = 0; b < NBLK; b++) for (int p = 0; p < 16; p++) direct[b][p] = {24'hffffff, 32'h0};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < TEXN; i++) begin
      @(negedge clk);
      tex[i] = {8'hff, 8'(next_rand(256)), 8'(next_rand(256)), 8'(next_rand(256))};
      tex_wr_en = 1'b1; tex_wr_addr = (2*TL+1)'(i); tex_wr_data = tex[i];
    end
    @(negedge clk);
    tex_wr_en = 1'b0; tex_invalidate = 1'b1; fb_clear = 1'b1;
    @(negedge clk);
    tex_invalidate = 1'b0; fb_clear = 1'b0;
    while (fb_clear_busy) @(negedge clk);
    for (int k = 0; k < NPRIM; k++) begin
      int w, h, x0, y0;
      logic [ZW-1:0] z;
      logic [31:0] c;
      logic [15:0] u0, v0;
      fragment_t f;
      w = 4 + next_rand(21); h = 4 + next_rand(21);
      x0 = RX0 + next_rand(RW - w + 1); y0 = RY0 + next_rand(RH - h + 1);
      z = ZW'(1 + next_rand(24'hfffff0));
      c = {8'hff, 8'(next_rand(256)), 8'(next_rand(256)), 8'(next_rand(256))};
      u0 = 16'(next_rand(65536)); v0 = 16'(next_rand(65536));
      for (int yy = y0; yy < y0 + h; yy++)
        for (int xx = x0; xx < x0 + w; xx++) begin
          f.x = XW'(xx); f.y = YW'(yy); f.z = z + ZW'(xx - x0); f.c = c; f.u = u0; f.v = v0; f.lod = 4'd0; f.lodf = 8'd0;
          fq[k % NR].push_back(f);
          reference(f);
          n_frag++;
        end
    end
    pending = int'(n_frag);
    rendering = 1'b1;
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
    rendering = 1'b0;
    repeat (3) @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    @(negedge clk);
    while (!idle) @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      disp_addr = BADDR_W'(b);
      #1;
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (disp_data[p] !== direct[b][p]) begin
          failures++;
          if (failures < 5) $display("FAIL NR=%0d CT=%0d block %0d pixel %0d", NR, CT, b, p);
        end
      end
    end
    n_evict = ev_e;
    n_stall = ev_s;
    reduction_pm = (ev_e == 0) ? 1000 : int'(1000 - (ev_s * 1000) / (ev_e * CT));
    if (reduction_pm < 0) reduction_pm = 0;
    done = 1'b1;
  end
endmodule
