// tb_miu: four sources offer numbered blocks to an MIU with a 4-entry pixel
// output queue, while the C-test side takes blocks at random. Checks that at
// most one source is served per cycle, that nothing is lost, duplicated or
// altered, that each source's blocks leave in order, that no block is taken
// while the queue is full, and that the full queue does push back.
module tb_miu;
  import davidii_pkg::*;
  localparam int N = 4, D = 4, PER = 300;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, out_valid, out_ready, ev_full;
  logic [N-1:0] in_valid, in_ready;
  blk_xfer_t [N-1:0] in_blk;
  blk_xfer_t out_blk;
  logic [2:0] count;

  miu #(.NUM_RAST(N), .OQ_DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_blk,
    .out_valid, .out_ready, .out_blk, .count, .ev_full);

  int sent [N];
  int recv [N];
  cblock_t data [N][PER];
  int n_full = 0, n_recv = 0;
  logic [N-1:0] acc;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++)
      for (int k = 0; k < PER; k++)
        for (int w = 0; w < $bits(cblock_t) / 32 + 1; w++) data[s][k] = {data[s][k], 32'($urandom)};
    rst_n = 1'b0; in_valid = '0; out_ready = 1'b0; in_blk = '0;
    for (int s = 0; s < N; s++) begin sent[s] = 0; recv[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (n_recv < N * PER) begin
      @(negedge clk);
      for (int s = 0; s < N; s++) begin
        // a source keeps its block offered until taken, then may pause
        if (!in_valid[s] && sent[s] < PER && $urandom_range(0, 1) == 0) in_valid[s] = 1'b1;
        in_blk[s].addr = BADDR_W'((s << 12) | sent[s]);
        in_blk[s].blk  = data[s][sent[s] % PER];
      end
      out_ready = ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if ($countones(in_ready) > 1 || (in_ready & ~in_valid) != 0 || (count == 3'(D) && in_ready != 0)) begin
        failures++; $display("FAIL intake ready=%b valid=%b count=%0d", in_ready, in_valid, count);
      end
      if (ev_full) n_full++;
      if (out_valid && out_ready) begin
        int s, k;
        s = int'(out_blk.addr) >> 12; k = int'(out_blk.addr) & 12'hfff;
        checks++;
        if (s >= N || k != recv[s] || out_blk.blk !== data[s][k]) begin
          failures++; $display("FAIL out src %0d seq %0d expected seq %0d", s, k, recv[s]);
        end
        if (s < N) recv[s]++;
        n_recv++;
      end
      acc = in_valid & in_ready;
      @(posedge clk);
      #1;
      for (int s = 0; s < N; s++)
        if (acc[s]) begin in_valid[s] = 1'b0; sent[s]++; end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL queue never full"); end
    $display("queue-full cycles %0d", n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
