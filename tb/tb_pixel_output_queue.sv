// tb_pixel_output_queue: random push/pop on an 8-entry queue against a
// reference queue: head data, full, empty and count every cycle, including
// simultaneous push and pop on a full queue.
module tb_pixel_output_queue;
  localparam int D = 8, W = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic rst_n, push, pop, empty, full;
  logic [W-1:0] push_data, head_data;
  logic [3:0] count;
  logic [W-1:0] model [$];
  int nfull = 0;

  pixel_output_queue #(.DEPTH(D), .W(W)) dut (.clk, .rst_n, .push, .push_data, .pop,
    .head_data, .empty, .full, .count);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; push = 1'b0; pop = 1'b0; push_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int bias;
      @(negedge clk);
      bias = ((i / 500) % 2 == 0) ? 3 : 1;     // alternate filling and draining phases
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == D) || int'(count) != model.size()
          || (model.size() > 0 && head_data !== model[0])) begin
        failures++;
        $display("FAIL cycle %0d size=%0d count=%0d empty=%b full=%b head=%h", i, model.size(), count, empty, full, head_data);
      end
      if (full) nfull++;
      pop  = !empty && ($urandom_range(0, 3) >= bias);
      push = ($urandom_range(0, 3) < bias) && (!full || pop);
      push_data = W'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_data);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
