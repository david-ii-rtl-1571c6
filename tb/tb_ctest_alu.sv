// tb_ctest_alu: random and corner pixels through one C-test ALU, compared with
// the reference z-test (less) and premultiplied over blend.
module tb_ctest_alu;
  import davidii_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  pixel_t src, dst, res;
  logic   pass;

  ctest_alu dut (.src, .dst, .pass, .result(res));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [23:0] sz, input logic [31:0] sc, input logic [23:0] dz, input logic [31:0] dc);
    logic        exp_pass;
    logic [55:0] exp;
    src = {sz, sc};
    dst = {dz, dc};
    #1;
    exp_pass = sz < dz;
    exp = exp_pass ? {sz, ref_over(sc, dc)} : {dz, dc};
    checks++;
    if (pass !== exp_pass || res !== exp) begin
      failures++;
      $display("FAIL src=%h dst=%h pass=%b res=%h exp=%h", src, dst, pass, res, exp);
    end
  endtask

  initial begin
    try(24'd5, 32'hff102030, 24'd6, 32'hff405060);   // opaque replaces
    try(24'd6, 32'hff102030, 24'd6, 32'hff405060);   // equal depth fails
    try(24'd7, 32'h80402010, 24'hffffff, 32'h0);     // onto empty
    try(24'd1, 32'h00000000, 24'd9, 32'hffffffff);   // fully transparent keeps colour
    for (int i = 0; i < 5000; i++)
      try(24'($urandom), rand_pm(), 24'($urandom), rand_pm());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
