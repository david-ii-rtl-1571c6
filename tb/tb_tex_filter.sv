// tb_tex_filter: random pairs of footprints, fractions and level weights; the
// result is checked against the expanded four-weight bilinear reference of each
// level blended by the level weight. With a zero level weight the result must
// be the bilinear filter of the first footprint, and with zero fractions too it
// must be a00 exactly.
module tb_tex_filter;
  import davidii_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  rgba_t a00, a10, a01, a11, b00, b10, b01, b11, out;
  logic [7:0] afu, afv, bfu, bfv, lodf;

  tex_filter dut (.a00, .a10, .a01, .a11, .afu, .afv, .b00, .b10, .b01, .b11, .bfu, .bfv, .lodf, .out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb, exp;
    for (int i = 0; i < 5000; i++) begin
      a00 = $urandom; a10 = $urandom; a01 = $urandom; a11 = $urandom;
      b00 = $urandom; b10 = $urandom; b01 = $urandom; b11 = $urandom;
      afu = (i < 10) ? 8'd0 : 8'($urandom);
      afv = (i < 10) ? 8'd0 : 8'($urandom);
      bfu = 8'($urandom); bfv = 8'($urandom);
      lodf = (i < 1000) ? 8'd0 : 8'($urandom);
      #1;
      ea = ref_bilin(a00, a10, a01, a11, int'(afu), int'(afv));
      eb = ref_bilin(b00, b10, b01, b11, int'(bfu), int'(bfv));
      exp = (lodf == 0) ? ea : ref_lerp(ea, eb, int'(lodf));
      checks++;
      if (out !== exp || (i < 10 && out !== a00)) begin
        failures++;
        $display("FAIL afu=%0d afv=%0d lodf=%0d out=%h exp=%h", afu, afv, lodf, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
