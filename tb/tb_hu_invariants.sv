// tb_hu_invariants: random normalised moments (and those of the two
// reference shapes) against Hu's formulas evaluated in double precision.
// The absolute tolerance scales with the size of the terms each invariant
// sums, as single precision cancellation allows. One-clock latency.
// The seven formulas checked are those of the design description;
// the stimuli are this testbench's own.
module tb_hu_invariants;
  import tb_pkg::*;
  import ic_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  eta_t eta;
  feature_vec_t hu;
  int checks = 0, failures = 0;

  hu_invariants dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input logic [31:0] ev [7]);
    real e [7], r [7], s;
    {eta.eta11, eta.eta20, eta.eta02, eta.eta21, eta.eta12, eta.eta30, eta.eta03} =
      {ev[0], ev[1], ev[2], ev[3], ev[4], ev[5], ev[6]};
    for (int i = 0; i < 7; i++) e[i] = fp2real(ev[i]);
    ref_hu_from_eta(e, r);
    s = 0.0;
    for (int i = 0; i < 7; i++) s += rabs(e[i]);
    @(negedge clk) in_valid = 1;
    @(posedge clk); #1;
    check("latency", out_valid);
    @(negedge clk) in_valid = 0;
    for (int k = 0; k < 7; k++) begin
      // terms of I1 are of order s, of I2..I4 s^2, of I5..I7 up to 4*s^4
      real tol;
      tol = (k == 0) ? 1e-6 * s : (k < 4) ? 1e-6 * 16.0 * s * s : 1e-6 * 64.0 * s * s * s * s;
      if (!close(hu[k], r[k], 1e-5, tol)) $display("  I%0d got %g ref %g", k + 1, fp2real(hu[k]), r[k]);
      check("hu", close(hu[k], r[k], 1e-5, tol));
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ev [7];
    real mu [8];
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_mu(class2_image(), 20, 20, mu);
    for (int i = 0; i < 7; i++) ev[i] = real2fp(mu[i + 1] / (mu[0] * mu[0]));
    run(ev);
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 7; i++) ev[i] = rand_fp(-12, -1);
      ev[1][31] = 1'b0; ev[2][31] = 1'b0;     // eta20, eta02 are positive
      run(ev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
