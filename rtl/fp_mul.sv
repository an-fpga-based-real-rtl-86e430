// fp_mul: IEEE 754 single-precision multiplier unit.
//
// Multiplies the 24-bit mantissas into a 48-bit product, normalises by at
// most one place, rounds to nearest, ties to even, and adds the exponents
// less the bias (fp_pkg::fmul). A zero operand gives +0; underflow flushes
// to +0, overflow saturates. Used by the central moment and Hu invariant
// datapaths; its structure and rounding are this design's own.
// Timing: combinational.
module fp_mul
  import ic_pkg::*, fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y,
  output logic  overflow,
  output logic  underflow
);

  fp_res_t r;

  always_comb begin
    r         = fmul(a, b);
    y         = r.y;
    overflow  = r.overflow;
    underflow = r.underflow;
  end

endmodule
