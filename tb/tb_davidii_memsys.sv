// tb_davidii_memsys: the miss-latency study. The same frame is rendered by nine
// processors: 1, 4 and 16 rasterizers, each with C-test times of 16, 12 and 8
// cycles per block (conventional DRAM, C-RAM and embedded frame buffer). Every
// frame buffer must be correct. The latency reduction rate must not fall when
// the C-test gets faster, nor rise when rasterizers are added, and the single
// rasterizer with the embedded frame buffer must hide nearly all latency.
// Prints the reduction rates and the average fragments per cycle and
// rasterizer for each configuration.
module tb_davidii_memsys;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NCFG = 9;
  localparam int CFG_NR [NCFG] = '{1, 1, 1, 4, 4, 4, 16, 16, 16};
  localparam int CFG_CT [NCFG] = '{16, 12, 8, 16, 12, 8, 16, 12, 8};

  logic   done [NCFG];
  int     r_checks [NCFG], r_fail [NCFG], red [NCFG];
  longint frag [NCFG], evict [NCFG], stall [NCFG], cyc [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_run
    tb_memsys_run #(.NR(CFG_NR[i]), .CT(CFG_CT[i])) u_run (
      .clk, .done(done[i]), .checks(r_checks[i]), .failures(r_fail[i]), .n_frag(frag[i]),
      .n_evict(evict[i]), .n_stall(stall[i]), .n_cycles(cyc[i]), .reduction_pm(red[i]));
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit all_done();
    for (int i = 0; i < NCFG; i++) if (!done[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    @(posedge clk);
    while (!all_done()) @(posedge clk);
    for (int i = 0; i < NCFG; i++) begin
      $display("rasterizers %2d  C-test %2d cycles: fragments %0d  evicting misses %0d  stall cycles %0d  render cycles %0d  reduction %0d.%0d%%  AFPC %0d.%03d",
               CFG_NR[i], CFG_CT[i], frag[i], evict[i], stall[i], cyc[i], red[i] / 10, red[i] % 10,
               (frag[i] * 1000 / (cyc[i] * CFG_NR[i])) / 1000, (frag[i] * 1000 / (cyc[i] * CFG_NR[i])) % 1000);
      checks += r_checks[i];
      failures += r_fail[i];
    end
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (!(red[3*g + 2] >= red[3*g + 1] && red[3*g + 1] >= red[3*g])) begin
        failures++; $display("FAIL reduction not ordered by C-test speed for %0d rasterizers", CFG_NR[3*g]);
      end
    end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (!(red[c] >= red[3 + c] && red[3 + c] >= red[6 + c])) begin
        failures++; $display("FAIL reduction rises with more rasterizers at %0d cycles", CFG_CT[c]);
      end
    end
    checks++;
    if (red[2] < 950) begin failures++; $display("FAIL one rasterizer, 8-cycle C-test hides only %0d per mille", red[2]); end
    checks++;
    if (stall[6] == 0) begin failures++; $display("FAIL 16 rasterizers on 16-cycle C-test never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
