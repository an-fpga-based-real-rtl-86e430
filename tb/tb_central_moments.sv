// tb_central_moments: feeds raw moments of known and random images and
// compares the floating-point central moments with values summed directly
// about the centroid in double precision. The tolerance scales with the
// largest raw moment the expansion subtracts, since single precision
// cancellation is inherent in the method. Checks the two-clock latency.
// The expected values come from the textbook definition (sums about
// the exact centroid), not from the expansions the block copies from the
// design description; the shapes and tolerances are this testbench's own.
module tb_central_moments;
  import tb_pkg::*;
  import ic_pkg::*;
  localparam int W = 20, H = 20;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  raw_moments_t raw;
  central_moments_t mu;
  int checks = 0, failures = 0;

  central_moments dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input image_t im, input string name);
    longint m [10];
    real    r [8];
    real    scale;
    int     cyc;
    logic [31:0] got [8];
    ref_raw(im, W, H, m);
    ref_mu(im, W, H, r);
    raw = '{m00: 32'(m[0]), m10: 32'(m[1]), m01: 32'(m[2]), m11: 32'(m[3]), m20: 32'(m[4]),
            m02: 32'(m[5]), m21: 32'(m[6]), m12: 32'(m[7]), m30: 32'(m[8]), m03: 32'(m[9])};
    @(negedge clk) in_valid = 1;
    @(posedge clk);
    @(negedge clk) in_valid = 0;
    cyc = 1;
    while (!out_valid) begin
      @(posedge clk); #1; cyc++;
    end
    check({name, " latency"}, cyc == 2);
    got = '{mu.mu00, mu.mu11, mu.mu20, mu.mu02, mu.mu21, mu.mu12, mu.mu30, mu.mu03};
    check({name, " mu00"}, fp2real(got[0]) == r[0]);
    for (int i = 1; i < 8; i++) begin
      scale = (i < 4) ? real'(m[4] + m[5] + m[3]) : real'(m[6] + m[7] + m[8] + m[9]);
      if (!close(got[i], r[i], 1e-5, 1e-6 * scale + 1e-6)) $display("  %s mu[%0d] got %g ref %g", name, i, fp2real(got[i]), r[i]);
      check({name, " mu"}, close(got[i], r[i], 1e-5, 1e-6 * scale + 1e-6));
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(class1_image(), "class I");
    run(class2_image(), "class II");
    for (int i = 0; i < 30; i++) run(random_blob(W, H), "random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
