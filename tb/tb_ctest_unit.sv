// tb_ctest_unit: blocks with random masks, depths and colours (some for the
// same address back to back) go through the C-test unit into a frame-buffer
// model. Checks the merged frame buffer against the reference C-test, that a
// block is written exactly CTEST_CYCLES-1 cycles after it is taken, that with
// blocks always waiting one is taken every CTEST_CYCLES cycles, and that
// nothing is taken while enable is low.
module tb_ctest_unit;
  import davidii_pkg::*;
  import tb_ref_pkg::*;
  localparam int CYC = 8, NB = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, enable, in_valid, in_ready, fb_we, busy, ev_block, ev_pass, ev_fail;
  blk_xfer_t in_blk;
  logic [BADDR_W-1:0] fb_rd_addr, fb_wr_addr;
  fb_block_t fb_rd_data, fb_wr_data;
  fb_block_t fbm [NB];
  logic [55:0] refm [NB][16];

  ctest_unit #(.CTEST_CYCLES(CYC), .NUM_CTEST_ALUS(2)) dut (.clk, .rst_n, .enable, .in_valid, .in_ready,
    .in_blk, .fb_rd_addr, .fb_rd_data, .fb_we, .fb_wr_addr, .fb_wr_data, .busy, .ev_block, .ev_pass, .ev_fail);

  assign fb_rd_data = fbm[fb_rd_addr % NB];
  always @(posedge clk) if (fb_we) fbm[fb_wr_addr % NB] <= fb_wr_data;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int take_cycle [$];
  int take_addr [$];
  int n_pass = 0, n_fail = 0;

  always @(negedge clk) begin
    if (ev_pass) n_pass++;
    if (ev_fail) n_fail++;
    if (fb_we) begin
      checks++;
      if (take_cycle.size() == 0 || cycle != take_cycle[0] + CYC - 1 || int'(fb_wr_addr) != take_addr[0]) begin
        failures++; $display("FAIL write at cycle %0d addr %0d", cycle, fb_wr_addr);
      end
      if (take_cycle.size() > 0) begin void'(take_cycle.pop_front()); void'(take_addr.pop_front()); end
    end
  end

  function automatic blk_xfer_t rand_blk(input int addr);
    blk_xfer_t b;
    b.addr = BADDR_W'(addr);
    b.blk.mask = 16'($urandom);
    for (int p = 0; p < 16; p++) b.blk.pix[p] = {24'($urandom_range(0, 1000)), rand_pm()};
    return b;
  endfunction

  initial begin
    int prev, gaps_bad, last_addr;
    rst_n = 1'b0; enable = 1'b1; in_valid = 1'b0; in_blk = '0;
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < 16; p++) begin
        fbm[b][p] = {24'($urandom_range(0, 1000)), rand_pm()};
        refm[b][p] = fbm[b][p];
      end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    prev = -1; gaps_bad = 0; last_addr = 0;
    for (int i = 0; i < 400; i++) begin
      int a;
      @(negedge clk);
      a = ($urandom_range(0, 3) == 0) ? last_addr : $urandom_range(0, NB - 1);
      last_addr = a;
      in_blk = rand_blk(a);
      in_valid = 1'b1;
      if (i == 300) begin
        enable = 1'b0;
        repeat (20) begin
          @(negedge clk); #1;
          checks++;
          if (in_ready) begin failures++; $display("FAIL ready while disabled"); end
        end
        enable = 1'b1;
      end
      #1;
      while (!in_ready) begin
        @(negedge clk); #1;
      end
      if (i < 200 && prev >= 0 && cycle - prev != CYC) gaps_bad++;
      if (i == 200) begin
        // pause so that the unit goes idle, then resume
        in_valid = 1'b0;
        repeat (20) @(negedge clk);
        in_valid = 1'b1; #1;
      end
      prev = cycle;
      take_cycle.push_back(cycle); take_addr.push_back(a);
      for (int p = 0; p < 16; p++)
        if (in_blk.blk.mask[p] && in_blk.blk.pix[p].z < refm[a][p][55:32])
          refm[a][p] = {in_blk.blk.pix[p].z, ref_over(in_blk.blk.pix[p].c, refm[a][p][31:0])};
      @(posedge clk);
      #1 in_valid = 1'b0;
    end
    repeat (CYC + 2) @(negedge clk);
    for (int b = 0; b < NB; b++)
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (fbm[b][p] !== refm[b][p]) begin failures++; $display("FAIL fb %0d.%0d %h exp %h", b, p, fbm[b][p], refm[b][p]); end
      end
    checks++;
    if (gaps_bad != 0) begin failures++; $display("FAIL %0d block intervals differ from %0d cycles", gaps_bad, CYC); end
    checks++;
    if (take_cycle.size() != 0 || n_pass == 0 || n_fail == 0) begin failures++; $display("FAIL pending %0d pass %0d fail %0d", take_cycle.size(), n_pass, n_fail); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
