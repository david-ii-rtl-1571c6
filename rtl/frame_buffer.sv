// frame_buffer: the embedded frame buffer (EDFB memory system).
//
// Holds depth and colour for the whole screen as NUM_BLOCKS words of one 4x4
// pixel block each (16 x 56 = 896 bits), the very wide on-chip path that
// embedding the frame buffer allows. Ports:
//   rd_addr/rd_data      C-test read, combinational;
//   we/wr_addr/wr_data   C-test write, at the clock edge;
//   disp_addr/disp_data  read-out for display or the host, combinational;
//   clear/clear_busy     a pulse on clear writes far depth and transparent black
//                        to one block per cycle for NUM_BLOCKS cycles; C-test
//                        writes must wait until clear_busy falls.
// An embedded-DRAM macro would take the place of the array in a real chip; the
// clear sweep is this design's addition.
module frame_buffer
  import davidii_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS = 120000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [BADDR_W-1:0] rd_addr,
  output fb_block_t          rd_data,
  input  logic               we,
  input  logic [BADDR_W-1:0] wr_addr,
  input  fb_block_t          wr_data,
  input  logic [BADDR_W-1:0] disp_addr,
  output fb_block_t          disp_data,
  input  logic               clear,
  output logic               clear_busy
);

  fb_block_t          mem [NUM_BLOCKS];
  logic [BADDR_W-1:0] clr_addr;

  assign rd_data   = mem[rd_addr];
  assign disp_data = mem[disp_addr];

  always_ff @(posedge clk) begin
    if (clear_busy)
      mem[clr_addr] <= {BLK_PIX{PIXEL_EMPTY}};
    else if (we)
      mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clear_busy <= 1'b0;
      clr_addr   <= '0;
    end else if (clear_busy) begin
      if (int'(clr_addr) == NUM_BLOCKS - 1) clear_busy <= 1'b0;
      clr_addr <= clr_addr + 1'b1;
    end else if (clear) begin
      clear_busy <= 1'b1;
      clr_addr   <= '0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(we && clear_busy))
    else $error("frame_buffer: write during clear");

endmodule
