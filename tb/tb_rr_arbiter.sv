// tb_rr_arbiter: random request patterns on a 5-way arbiter; the grant is
// compared with a reference round-robin pointer, and a requester held high is
// checked to be granted within N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n;
  logic [N-1:0] req, gnt;
  logic [2:0] gnt_idx;
  logic adv;
  int ptr;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .adv, .gnt, .gnt_idx);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, wait_cnt;
    rst_n = 1'b0; req = '0; adv = 1'b0; ptr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      req = N'($urandom);
      if (i > 3000) req[2] = 1'b1;
      adv = ($urandom_range(0, 3) != 0);
      #1;
      exp = -1;
      for (int k = 0; k < N; k++)
        if (exp < 0 && req[(ptr + k) % N]) exp = (ptr + k) % N;
      checks++;
      if (exp < 0 ? (gnt !== '0) : (gnt !== N'(1 << exp) || int'(gnt_idx) != exp)) begin
        failures++;
        $display("FAIL req=%b ptr=%0d gnt=%b exp=%0d", req, ptr, gnt, exp);
      end
      @(posedge clk);
      if (adv && exp >= 0) ptr = (exp + 1) % N;
    end
    // starvation bound: requester 2 held, all others always asking, adv always
    wait_cnt = 0;
    @(negedge clk);
    req = '1; adv = 1'b1;
    for (int i = 0; i < 3 * N; i++) begin
      #1;
      if (gnt[2]) wait_cnt = 0; else wait_cnt++;
      checks++;
      if (wait_cnt >= N) begin failures++; $display("FAIL starvation"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
