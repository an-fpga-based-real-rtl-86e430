// central_moments: centroid and central moments in floating point.
//
// Stage 1 (registered on in_valid) converts the ten raw integer moments to
// IEEE 754 single precision with int2fp and divides for the centroid,
// xm = M10 / M00 and ym = M01 / M00. Stage 2 forms the central moments
// with the expansions used in the design description:
//   mu20 = M20 - xm*M10            mu02 = M02 - ym*M01
//   mu11 = M11 - ym*M10
//   mu30 = M30 - 3*M20*xm + xm^2*2*M10
//   mu03 = M03 - 3*M02*ym + ym^2*2*M01
//   mu12 = M12 - 2*M11*ym - xm*M02 + ym^2*2*M10
//   mu21 = M21 - 2*M11*xm - ym*M20 + xm^2*2*M01
//   mu00 = M00
// The operation order copies the description's dataflow so that rounding
// matches it. Timing: out_valid follows in_valid by two clocks; the two
// register stages are this design's choice.
module central_moments
  import ic_pkg::*, fp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  raw_moments_t     raw,
  output logic             out_valid,
  output central_moments_t mu
);

  fp32_t f00, f10, f01, f11, f20, f02, f21, f12, f30, f03;
  int2fp u_c00 (.value(raw.m00), .fp(f00));
  int2fp u_c10 (.value(raw.m10), .fp(f10));
  int2fp u_c01 (.value(raw.m01), .fp(f01));
  int2fp u_c11 (.value(raw.m11), .fp(f11));
  int2fp u_c20 (.value(raw.m20), .fp(f20));
  int2fp u_c02 (.value(raw.m02), .fp(f02));
  int2fp u_c21 (.value(raw.m21), .fp(f21));
  int2fp u_c12 (.value(raw.m12), .fp(f12));
  int2fp u_c30 (.value(raw.m30), .fp(f30));
  int2fp u_c03 (.value(raw.m03), .fp(f03));

  // centroid dividers (fp_div; their flags are not used: an empty image
  // gives a zero centroid and zero moments)
  fp32_t xm_c, ym_c;
  fp_div u_xm (.a(f10), .b(f00), .y(xm_c), .div_by_zero(), .overflow(), .underflow());
  fp_div u_ym (.a(f01), .b(f00), .y(ym_c), .div_by_zero(), .overflow(), .underflow());

  // stage 1 registers
  logic  v1;
  fp32_t r00, r10, r01, r11, r20, r02, r21, r12, r30, r03, xm, ym;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      {r00, r10, r01, r11, r20, r02, r21, r12, r30, r03, xm, ym} <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        {r00, r10, r01, r11, r20, r02} <= {f00, f10, f01, f11, f20, f02};
        {r21, r12, r30, r03}           <= {f21, f12, f30, f03};
        xm <= xm_c;
        ym <= ym_c;
      end
    end
  end

  // stage 2: central moments
  central_moments_t mu_c;
  fp32_t xm2, ym2, two_m10, two_m01, two_m11;

  always_comb begin
    xm2     = f_mul(xm, xm);
    ym2     = f_mul(ym, ym);
    two_m10 = f_mul(FP_TWO, r10);
    two_m01 = f_mul(FP_TWO, r01);
    two_m11 = f_mul(FP_TWO, r11);

    mu_c.mu00 = r00;
    mu_c.mu20 = f_sub(r20, f_mul(xm, r10));
    mu_c.mu02 = f_sub(r02, f_mul(ym, r01));
    mu_c.mu11 = f_sub(r11, f_mul(ym, r10));
    mu_c.mu30 = f_add(f_sub(r30, f_mul(f_mul(FP_THREE, r20), xm)), f_mul(xm2, two_m10));
    mu_c.mu03 = f_add(f_sub(r03, f_mul(f_mul(FP_THREE, r02), ym)), f_mul(ym2, two_m01));
    mu_c.mu12 = f_add(f_sub(f_sub(r12, f_mul(two_m11, ym)), f_mul(xm, r02)), f_mul(ym2, two_m10));
    mu_c.mu21 = f_add(f_sub(f_sub(r21, f_mul(two_m11, xm)), f_mul(ym, r20)), f_mul(xm2, two_m01));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mu        <= '0;
    end else begin
      out_valid <= v1;
      if (v1) mu <= mu_c;
    end
  end

endmodule
