// fp_addsub: IEEE 754 single-precision adder / subtractor unit.
//
// y = a + b when sub = 0, y = a - b when sub = 1. The smaller operand is
// aligned to the larger exponent with guard, round and sticky bits, the
// mantissas are added or subtracted, the result is normalised by a
// leading-zero count and rounded to nearest, ties to even (fp_pkg::fadd).
// Underflow flushes to +0 and sets underflow; overflow saturates to the
// largest finite value and sets overflow. The design uses this operation
// for the central moments, the Hu invariants and the Manhattan distances;
// its inner structure and rounding are this design's own.
// Timing: combinational.
module fp_addsub
  import ic_pkg::*, fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y,
  output logic  overflow,
  output logic  underflow
);

  fp_res_t r;

  always_comb begin
    r         = fadd(a, b, sub);
    y         = r.y;
    overflow  = r.overflow;
    underflow = r.underflow;
  end

endmodule
