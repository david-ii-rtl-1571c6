// tex_cache: a rasterizer's local texture cache.
//
// A lookup names a mip level and needs the 2x2 footprint (u,v), (u+1,v),
// (u,v+1), (u+1,v+1) of that level (coordinates wrap at the level's edge; a
// trilinear fragment makes two lookups, one per level). The cache is split into four banks by
// the parity of the texel coordinates, bank = {v[0], u[0]}, so the four texels
// of any footprint fall in four different banks and are read in the same cycle.
// Each bank is direct mapped with TC_LINES lines of one texel; the line index
// takes the low bits of u>>1 and v>>1, the tag is the level with all of u>>1
// and v>>1. Texel addresses follow the mip layout of texture_memory.
//
// Lookup: lk_valid with lk_level/lk_u/lk_v (lk_u, lk_v are taken modulo the
// level's size); lk_hit is high in the same cycle when all
// four texels are present, and t00/t10/t01/t11 then hold them. On a miss the
// cache fetches the missing texels one at a time over the memory port: mem_req
// with mem_addr is held until mem_gnt; the texel arrives with
// mem_rvalid some cycles later and is written. The requester keeps the lookup
// stable until lk_hit. A miss costs about three cycles per missing texel plus
// arbitration. ev_miss pulses once per texel fetched. invalidate (or reset)
// clears every line.
//
// The architecture gives each rasterizer its own texture cache; its organisation
// here (banking, size, one-texel lines) is this design's choice.
module tex_cache
  import davidii_pkg::*;
#(
  parameter int unsigned TEX_LOG  = 8,
  parameter int unsigned TC_LINES = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 invalidate,
  input  logic                 lk_valid,
  input  logic [3:0]           lk_level,
  input  logic [TEX_LOG-1:0]   lk_u,
  input  logic [TEX_LOG-1:0]   lk_v,
  output logic                 lk_hit,
  output rgba_t                t00,
  output rgba_t                t10,
  output rgba_t                t01,
  output rgba_t                t11,
  output logic                 mem_req,
  output logic [2*TEX_LOG:0]   mem_addr,
  input  logic                 mem_gnt,
  input  logic                 mem_rvalid,
  input  logic [31:0]          mem_rdata,
  output logic                 ev_miss
);

  localparam int unsigned IW  = $clog2(TC_LINES);
  localparam int unsigned IU  = IW / 2;          // index bits taken from u>>1
  localparam int unsigned IV  = IW - IU;         // index bits taken from v>>1
  localparam int unsigned TW  = 4 + 2 * (TEX_LOG - 1);
  localparam int unsigned AW  = 2 * TEX_LOG + 1;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_t;

  logic          valid_q [4][TC_LINES];
  logic [TW-1:0] tag_q   [4][TC_LINES];
  rgba_t         data_q  [4][TC_LINES];

  logic [TEX_LOG-1:0] u0, v0, u1, v1, msk;
  logic [AW-1:0]      base;
  logic [TEX_LOG-1:0] bu [4];
  logic [TEX_LOG-1:0] bv [4];
  logic [IW-1:0]      bidx [4];
  logic [TW-1:0]      btag [4];
  logic [3:0]         bhit;
  rgba_t              bdata [4];

  state_t             state;
  logic [1:0]         fill_bank;
  logic [IW-1:0]      fill_idx;
  logic [TW-1:0]      fill_tag;
  logic [1:0]         miss_bank;

  // first word of mip level lvl
  function automatic logic [AW-1:0] level_base(input logic [3:0] lvl);
    logic [AW-1:0] b;
    b = '0;
    for (int k = 0; k < TEX_LOG; k++)
      if (k < int'(lvl)) b = b + (AW'(1) << (2 * (TEX_LOG - k)));
    return b;
  endfunction

  always_comb begin
    msk  = TEX_LOG'((1 << (TEX_LOG - int'(lk_level))) - 1);
    base = level_base(lk_level);
    u0 = lk_u & msk;
    v0 = lk_v & msk;
    u1 = (u0 + 1'b1) & msk;
    v1 = (v0 + 1'b1) & msk;
    for (int b = 0; b < 4; b++) begin
      logic [TEX_LOG-2:0] uh, vh;
      bu[b]   = (u0[0] == b[0]) ? u0 : u1;
      bv[b]   = (v0[0] == b[1]) ? v0 : v1;
      uh      = bu[b][TEX_LOG-1:1];
      vh      = bv[b][TEX_LOG-1:1];
      bidx[b] = {vh[IV-1:0], uh[IU-1:0]};
      btag[b] = {lk_level, vh, uh};
      bhit[b] = valid_q[b][bidx[b]] && (tag_q[b][bidx[b]] == btag[b]);
      bdata[b] = data_q[b][bidx[b]];
    end
    miss_bank = 2'd0;
    for (int b = 3; b >= 0; b--)
      if (!bhit[b]) miss_bank = 2'(b);
  end

  assign lk_hit = lk_valid && (&bhit) && (state == S_IDLE);
  assign t00 = bdata[{v0[0], u0[0]}];
  assign t10 = bdata[{v0[0], ~u0[0]}];
  assign t01 = bdata[{~v0[0], u0[0]}];
  assign t11 = bdata[{~v0[0], ~u0[0]}];

  assign mem_req = (state == S_REQ);
  assign ev_miss = (state == S_IDLE) && lk_valid && !(&bhit) && !invalidate;

  always_ff @(posedge clk) begin
    if (state == S_WAIT && mem_rvalid) begin
      tag_q[fill_bank][fill_idx]  <= fill_tag;
      data_q[fill_bank][fill_idx] <= mem_rdata;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || invalidate) begin
      for (int b = 0; b < 4; b++)
        for (int i = 0; i < TC_LINES; i++)
          valid_q[b][i] <= 1'b0;
    end else if (state == S_WAIT && mem_rvalid) begin
      valid_q[fill_bank][fill_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || invalidate) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE:
          if (lk_valid && !(&bhit)) begin
            state     <= S_REQ;
            fill_bank <= miss_bank;
            fill_idx  <= bidx[miss_bank];
            fill_tag  <= btag[miss_bank];
            mem_addr  <= base + ((AW'(bv[miss_bank]) << (TEX_LOG - int'(lk_level))) | AW'(bu[miss_bank]));
          end
        S_REQ:
          if (mem_gnt) state <= S_WAIT;
        S_WAIT:
          if (mem_rvalid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
