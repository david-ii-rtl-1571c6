// tb_tex_blend: random texels and colours, modulate-and-premultiply against the
// reference.
module tb_tex_blend;
  import davidii_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  rgba_t texel, frag_c, out_pm;

  tex_blend dut (.texel, .frag_c, .out_pm);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int i = 0; i < 5000; i++) begin
      texel  = (i == 0) ? 32'hffffffff : $urandom;
      frag_c = (i == 1) ? 32'hffffffff : $urandom;
      #1;
      exp = ref_modulate_pm(texel, frag_c);
      checks++;
      if (out_pm !== exp) begin
        failures++;
        $display("FAIL t=%h c=%h out=%h exp=%h", texel, frag_c, out_pm, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
