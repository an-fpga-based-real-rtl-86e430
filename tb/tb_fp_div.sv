// tb_fp_div: self-checking test of the floating-point divider.
// Random quotients against the double-precision quotient rounded to
// single (within one ulp for the reference's double rounding), exact
// cases, and the divide-by-zero flag.
// IEEE 754 single precision follows the design description; the
// rounding and special-case rules checked are this design's own.
module tb_fp_div;
  import tb_pkg::*;

  logic [31:0] a, b, y;
  logic        dz, ovf, unf;
  int          checks = 0, failures = 0;
  int          exact = 0;

  fp_div dut (.a, .b, .y, .div_by_zero(dz), .overflow(ovf), .underflow(unf));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h y=%h", what, a, b, y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = rand_fp(-30, 30); b = rand_fp(-30, 30);
      #1;
      check("random", ulp_diff(y, real2fp(fp2real(a) / fp2real(b))) <= 1);
      if (y == real2fp(fp2real(a) / fp2real(b))) exact++;
    end
    check("mostly exact", exact > 3900);
    a = 32'h4140_0000; b = 32'h4040_0000; #1;    // 12 / 3
    check("12/3", y == 32'h4080_0000 && !dz);
    a = 32'h3F80_0000; b = 32'h4040_0000; #1;    // 1/3
    check("1/3", y == 32'h3EAA_AAAB);
    a = 32'h4140_0000; b = 32'h0; #1;
    check("div0", dz && y == 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
