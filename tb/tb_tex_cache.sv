// tb_tex_cache: random 2x2 lookups at random mip levels of a 16x16 mip-mapped
// texture through a small texture cache, with a memory model that grants after a random delay and answers one
// cycle after the grant. Checks the four texels (with wrap at each level's edge), that a repeated
// lookup hits in its first cycle, that a cold lookup fetches exactly the
// missing texels, and that invalidate forces fresh data.
module tb_tex_cache;
  import davidii_pkg::*;
  localparam int TL = 4, LINES = 4, N = ((1 << (2 * TL + 2)) - 1) / 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, invalidate, lk_valid, lk_hit, mem_req, mem_gnt, mem_rvalid, ev_miss;
  logic [TL-1:0] lk_u, lk_v;
  rgba_t t00, t10, t01, t11;
  logic [2*TL:0] mem_addr;
  logic [3:0] lk_level;
  logic [31:0] mem_rdata;
  logic [31:0] tex [N];
  int misses = 0;

  tex_cache #(.TEX_LOG(TL), .TC_LINES(LINES)) dut (.clk, .rst_n, .invalidate, .lk_valid, .lk_level, .lk_u, .lk_v,
    .lk_hit, .t00, .t10, .t01, .t11, .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata, .ev_miss);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model
  always @(posedge clk) begin
    if (!rst_n) begin
      mem_gnt <= 1'b0; mem_rvalid <= 1'b0;
    end else begin
      mem_rvalid <= mem_gnt;
      if (mem_gnt) mem_rdata <= tex[mem_addr];
      mem_gnt <= mem_req && !mem_gnt && ($urandom_range(0, 2) == 0);
    end
    if (ev_miss) misses++;
  end

  int lv = 0;   // level of the current lookup

  function automatic logic [31:0] texel(input int u, input int v);
    int m, b;
    m = (1 << (TL - lv)) - 1;
    b = 0;
    for (int k = 0; k < lv; k++) b += 1 << (2 * (TL - k));
    return tex[b + ((v & m) << (TL - lv)) + (u & m)];
  endfunction

  // one lookup; returns the cycles until hit
  task automatic lookup(input int u, input int v, output int cyc);
    cyc = 0;
    @(negedge clk);
    lk_valid = 1'b1; lk_level = 4'(lv); lk_u = TL'(u); lk_v = TL'(v);
    #1;
    while (!lk_hit) begin @(negedge clk); cyc++; #1; end
    checks++;
    if (t00 !== texel(u, v) || t10 !== texel(u + 1, v) || t01 !== texel(u, v + 1) || t11 !== texel(u + 1, v + 1)) begin
      failures++;
      $display("FAIL texels at (%0d,%0d)", u, v);
    end
    @(negedge clk);
    lk_valid = 1'b0;
  endtask

  initial begin
    int cyc, m0;
    for (int i = 0; i < N; i++) tex[i] = $urandom;
    rst_n = 1'b0; invalidate = 1'b0; lk_valid = 1'b0; lk_level = '0; lk_u = '0; lk_v = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // cold lookup: four fetches; repeat: hit at once
    m0 = misses;
    lookup(3, 5, cyc);
    checks++;
    if (misses - m0 != 4) begin failures++; $display("FAIL cold lookup fetched %0d texels", misses - m0); end
    lookup(3, 5, cyc);
    checks++;
    if (cyc != 0) begin failures++; $display("FAIL repeated lookup took %0d cycles", cyc); end
    // wrap at the edge
    lookup(15, 15, cyc);
    // random lookups
    for (int i = 0; i < 3000; i++) begin
      lv = (i < 1000) ? 0 : $urandom_range(0, TL);
      lookup($urandom_range(0, 15), $urandom_range(0, 15), cyc);
    end
    // same coordinates at two levels must give each level's texels
    lv = 1; lookup(2, 2, cyc);
    lv = 2; lookup(2, 2, cyc);
    lv = 1; lookup(2, 2, cyc);
    lv = 0;
    // invalidate, change the texture, look again
    lookup(7, 7, cyc);
    for (int i = 0; i < N; i++) tex[i] = $urandom;
    @(negedge clk); invalidate = 1'b1;
    @(negedge clk); invalidate = 1'b0;
    m0 = misses;
    lookup(7, 7, cyc);
    checks++;
    if (misses - m0 != 4) begin failures++; $display("FAIL invalidate left %0d texels", 4 - (misses - m0)); end
    $display("texture misses %0d", misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
