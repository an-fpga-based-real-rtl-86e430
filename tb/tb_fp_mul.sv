// tb_fp_mul: self-checking test of the floating-point multiplier.
// The product of two singles is exact in double precision, so the
// reference rounded to single must match bit for bit.
// IEEE 754 single precision follows the design description; the
// rounding and special-case rules checked are this design's own.
module tb_fp_mul;
  import tb_pkg::*;

  logic [31:0] a, b, y;
  logic        ovf, unf;
  int          checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y, .overflow(ovf), .underflow(unf));

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
      check("random", y == real2fp(fp2real(a) * fp2real(b)));
    end
    a = 32'h4040_0000; b = 32'h4080_0000; #1;    // 3 * 4
    check("3*4", y == 32'h4140_0000);
    a = 32'h0; b = 32'h4080_0000; #1;
    check("0*x", y == 32'h0);
    a = 32'h0100_0000; b = 32'h0100_0000; #1;
    check("underflow", y == 32'h0 && unf);
    a = 32'h7F00_0000; b = 32'h4100_0000; #1;
    check("overflow", ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
