// tb_pixel_cache: a 4-line pixel cache on a 32x16 screen (8x4 blocks) gets
// random fragments while the MIU side is randomly not ready. A reference model
// of the cache predicts in_ready, every evicted block and its address; evicted
// and flushed blocks are merged into a reference frame buffer with the
// reference C-test. For opaque fragments that frame buffer must equal one
// built by applying every fragment directly. Also checks that misses cost no
// cycle while the MIU is ready, and that a flush sends every written line.
module tb_pixel_cache;
  import davidii_pkg::*;
  import tb_ref_pkg::*;
  localparam int LINES = 4, BX = 8, NBLK = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, in_valid, in_ready, out_valid, out_ready, flush, flush_busy;
  logic ev_hit, ev_miss, ev_evict, ev_stall, ev_zfail;
  logic [XW-1:0] in_x;
  logic [YW-1:0] in_y;
  logic [ZW-1:0] in_z;
  rgba_t in_c;
  blk_xfer_t out_blk;

  pixel_cache #(.PC_LINES(LINES), .BLOCKS_X(BX)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_x, .in_y,
    .in_z, .in_c, .out_valid, .out_ready, .out_blk, .flush, .flush_busy,
    .ev_hit, .ev_miss, .ev_evict, .ev_stall, .ev_zfail);

  // reference cache
  logic        m_lval [LINES];
  int          m_tag  [LINES];
  logic [15:0] m_mask [LINES];
  logic [55:0] m_pix  [LINES][16];
  // reference frame buffers: merged from evictions, and direct
  logic [55:0] fb [NBLK][16];
  logic [55:0] direct [NBLK][16];
  int n_evict = 0, n_stall = 0, n_hit = 0, n_zfail = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [55:0] ctest(input logic [55:0] s, input logic [55:0] d);
    if (s[55:32] < d[55:32]) return {s[55:32], ref_over(s[31:0], d[31:0])};
    return d;
  endfunction

  task automatic merge(input blk_xfer_t b);
    for (int p = 0; p < 16; p++)
      if (b.blk.mask[p]) fb[b.addr][p] = ctest(b.blk.pix[p], fb[b.addr][p]);
  endtask

  task automatic check_block(input blk_xfer_t b, input int line);
    int exp_addr;
    exp_addr = m_tag[line] * LINES + line;
    checks++;
    if (int'(b.addr) != exp_addr || b.blk.mask !== m_mask[line]) begin
      failures++; $display("FAIL evicted addr %0d exp %0d mask %h exp %h", b.addr, exp_addr, b.blk.mask, m_mask[line]);
    end
    for (int p = 0; p < 16; p++)
      if (m_mask[line][p] && b.blk.pix[p] !== m_pix[line][p]) begin
        failures++; $display("FAIL evicted pixel %0d", p);
      end
  endtask

  // drive one fragment until accepted; out_ready is random with probability rdy_pct
  task automatic send(input int x, input int y, input logic [23:0] z, input logic [31:0] c, input int rdy_pct, output int cyc);
    int baddr, idx, tag, pi;
    logic hit, vd;
    logic [55:0] d;
    cyc = 0;
    baddr = (y / 4) * BX + x / 4; idx = baddr % LINES; tag = baddr / LINES; pi = (y % 4) * 4 + x % 4;
    hit = m_lval[idx] && m_tag[idx] == tag;
    vd  = m_lval[idx] && !hit && m_mask[idx] != 0;
    forever begin
      @(negedge clk);
      in_valid = 1'b1; in_x = XW'(x); in_y = YW'(y); in_z = z; in_c = c;
      out_ready = ($urandom_range(0, 99) < rdy_pct);
      #1;
      cyc++;
      checks++;
      if (in_ready !== !(vd && !out_ready) || out_valid !== vd) begin
        failures++; $display("FAIL handshake ready=%b valid=%b vd=%b", in_ready, out_valid, vd);
      end
      if (vd && out_ready) begin check_block(out_blk, idx); merge(out_blk); n_evict++; end
      if (vd && !out_ready) n_stall++;
      if (in_ready) break;
    end
    if (!hit) begin m_lval[idx] = 1'b1; m_tag[idx] = tag; m_mask[idx] = '0; end
    else n_hit++;
    d = m_mask[idx][pi] ? m_pix[idx][pi] : {24'hffffff, 32'h0};
    if (z < d[55:32]) begin m_pix[idx][pi] = ctest({z, c}, d); m_mask[idx][pi] = 1'b1; end
    else n_zfail++;
    direct[baddr][pi] = ctest({z, c}, direct[baddr][pi]);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic do_flush();
    int line;
    @(negedge clk);
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    line = 0;
    while (flush_busy) begin
      out_ready = ($urandom_range(0, 1) == 0);
      #1;
      if (out_valid && out_ready) begin
        line = out_blk.addr % LINES;
        checks++;
        if (!(m_lval[line] && m_mask[line] != 0)) begin failures++; $display("FAIL flushed clean line"); end
        check_block(out_blk, line);
        merge(out_blk);
        m_mask[line] = '0;
      end
      @(negedge clk);
    end
    for (int l = 0; l < LINES; l++) begin
      checks++;
      if (m_lval[l] && m_mask[l] != 0) begin failures++; $display("FAIL line %0d not flushed", l); end
      m_lval[l] = 1'b0;
    end
  endtask

  initial begin
    int cyc, total;
    rst_n = 1'b0; in_valid = 1'b0; out_ready = 1'b1; flush = 1'b0; in_x = '0; in_y = '0; in_z = '0; in_c = '0;
    for (int l = 0; l < LINES; l++) begin m_lval[l] = 1'b0; m_mask[l] = '0; end
    for (int b = 0; b < NBLK; b++) for (int p = 0; p < 16; p++) begin fb[b][p] = {24'hffffff, 32'h0}; direct[b][p] = fb[b][p]; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // opaque fragments, MIU mostly ready
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] c;
      c = {8'hff, 24'($urandom)};
      send($urandom_range(0, 31), $urandom_range(0, 15), 24'($urandom_range(0, 24'hfffffe)), c, 70, cyc);
    end
    do_flush();
    for (int b = 0; b < NBLK; b++)
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (fb[b][p] !== direct[b][p]) begin failures++; $display("FAIL frame pixel %0d.%0d", b, p); end
      end
    // zero-cycle misses: with the MIU always ready every fragment takes one cycle
    total = 0;
    for (int i = 0; i < 500; i++) begin
      send($urandom_range(0, 31), $urandom_range(0, 15), 24'($urandom_range(0, 24'hfffffe)), rand_pm(), 100, cyc);
      total += cyc;
    end
    checks++;
    if (total != 500) begin failures++; $display("FAIL 500 fragments took %0d cycles", total); end
    // translucent fragments, MIU often busy
    for (int i = 0; i < 2000; i++)
      send($urandom_range(0, 31), $urandom_range(0, 15), 24'($urandom_range(0, 24'hfffffe)), rand_pm(), 40, cyc);
    do_flush();
    checks++;
    if (n_evict == 0 || n_stall == 0 || n_hit == 0 || n_zfail == 0) begin
      failures++; $display("FAIL a mechanism never happened: evict %0d stall %0d hit %0d zfail %0d", n_evict, n_stall, n_hit, n_zfail);
    end
    $display("evictions %0d stalls %0d hits %0d zfails %0d", n_evict, n_stall, n_hit, n_zfail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
