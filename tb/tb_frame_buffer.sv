// tb_frame_buffer: a 64-block frame buffer is written with random data, cleared
// (clear_busy must last exactly 64 cycles and every pixel must read far depth
// and black afterwards), then written and read through both read ports.
module tb_frame_buffer;
  import davidii_pkg::*;
  localparam int NB = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, we, clear, clear_busy;
  logic [BADDR_W-1:0] rd_addr, wr_addr, disp_addr;
  fb_block_t rd_data, wr_data, disp_data;
  fb_block_t model [NB];

  frame_buffer #(.NUM_BLOCKS(NB)) dut (.clk, .rst_n, .rd_addr, .rd_data, .we, .wr_addr, .wr_data,
    .disp_addr, .disp_data, .clear, .clear_busy);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fb_block_t rand_block();
    fb_block_t b;
    for (int i = 0; i < $bits(fb_block_t) / 32 + 1; i++)
      b = {b, 32'($urandom)};
    return b;
  endfunction

  initial begin
    int busy_cycles;
    rst_n = 1'b0; we = 1'b0; clear = 1'b0; rd_addr = '0; wr_addr = '0; disp_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < NB; a++) begin
      @(negedge clk); we = 1'b1; wr_addr = BADDR_W'(a); wr_data = rand_block();
    end
    @(negedge clk); we = 1'b0; clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    busy_cycles = 0;
    while (clear_busy) begin @(negedge clk); busy_cycles++; end
    checks++;
    if (busy_cycles != NB) begin failures++; $display("FAIL clear took %0d cycles", busy_cycles); end
    for (int a = 0; a < NB; a++) begin
      disp_addr = BADDR_W'(a); rd_addr = BADDR_W'(NB - 1 - a); #1;
      for (int p = 0; p < BLK_PIX; p++) begin
        checks++;
        if (disp_data[p].z !== 24'hffffff || disp_data[p].c !== 32'h0 || rd_data[p] !== disp_data[p]) begin
          failures++; $display("FAIL block %0d pixel %0d not cleared", a, p);
        end
      end
    end
    for (int i = 0; i < 200; i++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, NB - 1);
      we = 1'b1; wr_addr = BADDR_W'(a); wr_data = rand_block(); model[a] = wr_data;
      @(negedge clk); we = 1'b0;
      rd_addr = BADDR_W'(a); disp_addr = BADDR_W'(a); #1;
      checks++;
      if (rd_data !== model[a] || disp_data !== model[a]) begin failures++; $display("FAIL readback %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
