// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle, combinationally: the first requester at
// or after the priority pointer, searching upward and wrapping. When adv is high
// in a cycle with a grant, the pointer moves to just past the granted requester,
// so a requester that keeps asking waits at most N-1 grants. gnt is one-hot or
// zero; gnt_idx is its index. The pointer resets to 0.
//
// Used where the rasterizers share a resource: the MIU's pixel output queue and
// the texture memory. Round robin is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N-1:0]                req,
  input  logic                        adv,
  output logic [N-1:0]                gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx
);

  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr;
  logic          found;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    found   = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!found && req[i]) begin
        found   = 1'b1;
        gnt[i]  = 1'b1;
        gnt_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      ptr <= '0;
    else if (adv && found)
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
  end

endmodule
