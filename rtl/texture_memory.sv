// texture_memory: the mip-mapped texture store shared by all rasterizers'
// texture caches.
//
// Holds one square texture of 2^TEX_LOG texels per side with its full mip
// chain, 32-bit RGBA per texel. Level L (side 2^(TEX_LOG-L)) starts at
//   base(L) = sum over k < L of 4^(TEX_LOG-k)
// and texel (u, v) of level L is at base(L) + v * 2^(TEX_LOG-L) + u; the chain
// takes (4^(TEX_LOG+1) - 1) / 3 words. One synchronous read port (rd_data is
// valid the cycle after rd_en) serves texture-cache refills; one write port
// loads textures from the host. The architecture keeps textures in its unified
// graphics memory; here that memory is an on-chip RAM, this design's
// simplification.
module texture_memory #(
  parameter int unsigned TEX_LOG = 8
) (
  input  logic                 clk,
  input  logic                 rd_en,
  input  logic [2*TEX_LOG:0]   rd_addr,
  output logic [31:0]          rd_data,
  input  logic                 wr_en,
  input  logic [2*TEX_LOG:0]   wr_addr,
  input  logic [31:0]          wr_data
);

  localparam int unsigned TEXELS = (4 ** (TEX_LOG + 1) - 1) / 3;

  logic [31:0] mem [TEXELS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
