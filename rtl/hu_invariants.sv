// hu_invariants: Hu's seven moment invariants from normalised moments.
//
// With a = eta30 + eta12, b = eta21 + eta03, c = eta30 - 3*eta12,
// d = 3*eta21 - eta03 and e = eta20 - eta02:
//   I1 = eta20 + eta02
//   I2 = e^2 + 4*eta11^2
//   I3 = c^2 + d^2
//   I4 = a^2 + b^2
//   I5 = c*a*(a^2 - 3*b^2) + d*b*(3*a^2 - b^2)
//   I6 = e*(a^2 - b^2) + 4*eta11*a*b
//   I7 = d*a*(a^2 - 3*b^2) - c*b*(3*a^2 - b^2)
// These are the formulas of the design description; for I6 the form of
// its dataflow (4*eta11*a*b added outside the product with e) is used.
// All terms are computed in parallel, sharing a^2, b^2 and the brackets.
// hu[0] is I1 ... hu[6] is I7. Timing: out_valid follows in_valid by one
// clock (register stage is this design's choice).
module hu_invariants
  import ic_pkg::*, fp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  eta_t         eta,
  output logic         out_valid,
  output feature_vec_t hu
);

  fp32_t a, b, c, d, e, a2, b2, br5, br6;
  feature_vec_t hu_c;

  always_comb begin
    a   = f_add(eta.eta30, eta.eta12);
    b   = f_add(eta.eta21, eta.eta03);
    c   = f_sub(eta.eta30, f_mul(FP_THREE, eta.eta12));
    d   = f_sub(f_mul(FP_THREE, eta.eta21), eta.eta03);
    e   = f_sub(eta.eta20, eta.eta02);
    a2  = f_mul(a, a);
    b2  = f_mul(b, b);
    br5 = f_sub(a2, f_mul(FP_THREE, b2));     // a^2 - 3b^2
    br6 = f_sub(f_mul(FP_THREE, a2), b2);     // 3a^2 - b^2

    hu_c[0] = f_add(eta.eta20, eta.eta02);
    hu_c[1] = f_add(f_mul(e, e), f_mul(FP_FOUR, f_mul(eta.eta11, eta.eta11)));
    hu_c[2] = f_add(f_mul(c, c), f_mul(d, d));
    hu_c[3] = f_add(a2, b2);
    hu_c[4] = f_add(f_mul(f_mul(c, a), br5), f_mul(f_mul(d, b), br6));
    hu_c[5] = f_add(f_mul(e, f_sub(a2, b2)), f_mul(f_mul(a, b), f_mul(FP_FOUR, eta.eta11)));
    hu_c[6] = f_sub(f_mul(f_mul(d, a), br5), f_mul(f_mul(c, b), br6));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      hu        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) hu <= hu_c;
    end
  end

endmodule
