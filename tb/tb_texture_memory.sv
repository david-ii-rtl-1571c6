// tb_texture_memory: writes a whole 16x16 mip chain (341 words), then reads
// every word back with one-cycle latency.
module tb_texture_memory;
  localparam int TL = 4, N = ((1 << (2 * TL + 2)) - 1) / 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rd_en, wr_en;
  logic [2*TL:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;
  logic [31:0] model [N];

  texture_memory #(.TEX_LOG(TL)) dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 1'b0; wr_en = 1'b0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = (2*TL+1)'(a); wr_data = $urandom; model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = (2*TL+1)'(N - 1 - a);
      @(negedge clk);
      rd_en = 1'b0;
      checks++;
      if (rd_data !== model[N - 1 - a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", N - 1 - a, rd_data, model[N - 1 - a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
