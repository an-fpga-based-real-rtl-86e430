// int2fp: unsigned integer to IEEE 754 single-precision conversion.
//
// A priority encoder finds the most significant one; its position k sets
// the exponent to 127 + k and the 23 bits below it become the fraction,
// left-aligned. Bits beyond those 23 are dropped (truncation, no
// rounding), and the sign is always 0: both as in the design description,
// whose converter works the same way on a 32-bit input. Zero converts to
// +0.0, which is this design's addition.
// Timing: purely combinational.
module int2fp
  import ic_pkg::*;
#(
  parameter int IN_W = 32   // at most 64
) (
  input  logic [IN_W-1:0] value,
  output fp32_t           fp
);

  logic [63:0]     shifted;
  logic [7:0]      msb;
  logic            found;

  always_comb begin
    msb   = 8'd0;
    found = 1'b0;
    for (int i = IN_W - 1; i >= 0; i--) begin
      if (!found && value[i]) begin
        msb   = 8'(i);
        found = 1'b1;
      end
    end
    // move the leading one to bit 63; the fraction follows it
    shifted = 64'(value) << (8'd63 - msb);
    if (!found) fp = FP_ZERO;
    else        fp = {1'b0, 8'd127 + msb, shifted[62:40]};
  end

endmodule
