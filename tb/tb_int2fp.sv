// tb_int2fp: self-checking test of the integer to float converter.
// Values below 2^24 must convert exactly; larger ones must be truncated:
// not above the input and less than one unit of the 24th significant bit
// below it. Zero converts to +0.
// Integer-to-float conversion is named in the design description;
// the truncation checked is this design's own choice.
module tb_int2fp;
  import tb_pkg::*;

  logic [31:0] value, fp;
  int          checks = 0, failures = 0;

  int2fp #(.IN_W(32)) dut (.value, .fp);

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: value=%0d fp=%h (%f)", what, value, fp, fp2real(fp));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, f, ulp;
    value = 0; #1;
    check("zero", fp == 32'h0);
    value = 1; #1;
    check("one", fp == 32'h3F80_0000);
    value = 32'd100000; #1;
    check("100000", fp == 32'h47C3_5000);
    for (int i = 0; i < 3000; i++) begin
      value = $urandom >> $urandom_range(31);
      #1;
      v = real'(value);
      f = fp2real(fp);
      if (value < 32'h0100_0000) begin
        check("exact", f == v);
      end else begin
        ulp = 2.0 ** ($clog2(value + 1) - 24);
        check("truncated", f <= v && v - f < ulp && !fp[31]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
