// pixel_output_queue: the MIU's queue of blocks replaced from the pixel caches.
//
// A circular buffer of DEPTH entries addressed by a tail pointer (where the next
// replaced block is stored) and a head pointer (the block next written to the
// frame buffer). push stores push_data at the tail; pop retires the head entry,
// whose contents are visible on head_data whenever empty is low. Push and pop
// may happen in the same cycle, also when the queue is full (the pop frees the
// entry). count is the occupancy. Pushing into a full queue without a pop, or
// popping an empty one, is a protocol error and is asserted against.
//
// The head/tail organisation and the default of 128 entries follow the
// architecture; the rasterizers stall only while this queue is full.
module pixel_output_queue #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               push_data,
  input  logic                       pop,
  output logic [W-1:0]               head_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH > 1 ? DEPTH : 2);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] head, tail;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty     = (count == 0);
  assign full      = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign head_data = mem[head];

  always_ff @(posedge clk) begin
    if (push) mem[tail] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (push) tail <= incr(tail);
      if (pop)  head <= incr(head);
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("pixel_output_queue: push into full queue");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("pixel_output_queue: pop from empty queue");

endmodule
