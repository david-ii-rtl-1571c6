// tb_alpha_test: every alpha against every reference value.
module tb_alpha_test;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] alpha, ref_alpha;
  logic pass;

  alpha_test dut (.alpha, .ref_alpha, .pass);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 256; r++)
      for (int a = 0; a < 256; a++) begin
        alpha = 8'(a); ref_alpha = 8'(r);
        #1;
        checks++;
        if (pass !== (a >= r)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d ref=%0d pass=%b", a, r, pass);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
