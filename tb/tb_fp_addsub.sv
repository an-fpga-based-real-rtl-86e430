// tb_fp_addsub: self-checking test of the floating-point adder/subtractor.
// Random operands over a wide and a narrow exponent range, both signs,
// add and subtract, compared with the double-precision sum rounded to
// single (at most one ulp apart, allowing for the double rounding of the
// reference); plus exact cases: x - x = 0, x + 0 = x, 1.5 + 2.25 = 3.75,
// and the flush to zero of a result below the normal range.
// IEEE 754 single precision follows the design description; the
// rounding and special-case rules checked are this design's own.
module tb_fp_addsub;
  import tb_pkg::*;

  logic [31:0] a, b, y;
  logic        sub, ovf, unf;
  int          checks = 0, failures = 0;

  fp_addsub dut (.a, .b, .sub, .y, .overflow(ovf), .underflow(unf));

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h sub=%0d y=%h", what, a, b, sub, y);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    for (int i = 0; i < 4000; i++) begin
      if (i % 2 == 0) begin
        a = rand_fp(-20, 20); b = rand_fp(-20, 20);
      end else begin
        a = rand_fp(-2, 2);   b = rand_fp(-2, 2);
      end
      sub = 1'($urandom);
      #1;
      r = sub ? fp2real(a) - fp2real(b) : fp2real(a) + fp2real(b);
      check("random", ulp_diff(y, real2fp(r)) <= 1);
    end
    a = 32'h3FC0_0000; b = 32'h4010_0000; sub = 0; #1;   // 1.5 + 2.25
    check("1.5+2.25", y == 32'h4070_0000);
    a = 32'h4049_0FDB; b = a; sub = 1; #1;
    check("x-x", y == 32'h0);
    a = 32'hC123_4567; b = 32'h0; sub = 0; #1;
    check("x+0", y == a);
    a = 32'h0; b = 32'h4123_4567; sub = 1; #1;
    check("0-x", y == 32'hC123_4567);
    a = 32'h0180_0001; b = 32'h0180_0000; sub = 1; #1;  // below normal range
    check("underflow", y == 32'h0 && unf);
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; sub = 0; #1;
    check("overflow", ovf && y == 32'h7F7F_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
