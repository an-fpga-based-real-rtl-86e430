// fp_div: IEEE 754 single-precision divider unit.
//
// A 27-step restoring division (one quotient bit per step) divides the
// dividend mantissa, scaled by 2^26, by the divisor mantissa; the 27-bit
// quotient plus a sticky bit from the remainder is
// normalised and rounded to nearest, ties to even, and the exponents are
// subtracted with the bias added back (fp_pkg::fdiv). A zero dividend
// gives +0; a zero divisor gives +0 and div_by_zero. The design divides
// for the centroid and for the eta normalisation; this divider's
// structure is this design's own.
// Timing: combinational.
module fp_div
  import ic_pkg::*, fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y,
  output logic  div_by_zero,
  output logic  overflow,
  output logic  underflow
);

  fp_res_t r;

  always_comb begin
    r           = fdiv(a, b);
    y           = r.y;
    div_by_zero = r.div_by_zero;
    overflow    = r.overflow;
    underflow   = r.underflow;
  end

endmodule
