// eta_normalise: scale normalisation of the central moments.
//
// eta_pq = mu_pq / mu00^2 for the seven moments of order two and three.
// The textbook exponent (p+q)/2 + 1 would be 2 for second-order and 2.5
// for third-order moments; following the design description, which rounds
// fractional powers to whole numbers to save hardware, both use mu00^2.
// One multiplier (fp_mul) forms mu00^2 and seven dividers (fp_div) run
// in parallel; their status flags are not used, as a zero mu00 already
// gives zero results.
// Timing: out_valid follows in_valid by one clock (register stage is this
// design's choice).
module eta_normalise
  import ic_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  central_moments_t mu,
  output logic             out_valid,
  output eta_t             eta
);

  fp32_t m00_sq;
  fp32_t num [NUM_FEATURES];
  fp32_t q   [NUM_FEATURES];
  eta_t  eta_c;

  fp_mul u_sq (.a(mu.mu00), .b(mu.mu00), .y(m00_sq), .overflow(), .underflow());

  assign num = '{mu.mu11, mu.mu20, mu.mu02, mu.mu21, mu.mu12, mu.mu30, mu.mu03};

  for (genvar k = 0; k < NUM_FEATURES; k++) begin : g_div
    fp_div u_div (.a(num[k]), .b(m00_sq), .y(q[k]),
                  .div_by_zero(), .overflow(), .underflow());
  end

  assign eta_c = '{eta11: q[0], eta20: q[1], eta02: q[2], eta21: q[3],
                   eta12: q[4], eta30: q[5], eta03: q[6]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      eta       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) eta <= eta_c;
    end
  end

endmodule
