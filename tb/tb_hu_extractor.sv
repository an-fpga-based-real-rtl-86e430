// tb_hu_extractor: end-to-end feature extraction. A behavioural image
// memory (one-clock read latency) holds the two reference shapes, moved
// and rotated copies of them, and random blobs; the seven invariants are
// compared with values computed in double precision straight from the
// pixel definition, and the result time IMG_W*IMG_H + 7 clocks is checked.
// Moved and rotated copies must give the same invariants as the original.
// The formulas and the 20x20 size follow the design description;
// the test images and error bounds are this testbench's own.
module tb_hu_extractor;
  import tb_pkg::*;
  import ic_pkg::*;
  localparam int W = 20, H = 20;

  logic clk = 0, rst_n = 0, start = 0, rd_pix = 0, busy, hu_valid;
  logic [4:0] rd_x, rd_y;
  raw_moments_t raw;
  feature_vec_t hu;
  image_t img;
  int checks = 0, failures = 0;

  hu_extractor #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) rd_pix <= img[rd_y][rd_x];

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Single precision loses digits when the central moments are formed
  // from large raw moments, so the allowed error follows the error that
  // cancellation can put on eta (e2 for second, e3 for third order) and
  // how strongly each invariant depends on it.
  function automatic void tolerances(input image_t im, output real tol [7]);
    longint m [10];
    real mu [8], n2, e2, e3, s2, s3;
    ref_raw(im, W, H, m);
    ref_mu(im, W, H, mu);
    n2 = real'(m[0]) * real'(m[0]);
    e2 = 1e-6 * real'(m[3] + m[4] + m[5]) / n2;
    e3 = 1e-6 * real'(m[6] + m[7] + m[8] + m[9]) / n2;
    s2 = rabs(mu[1] / n2) + rabs(mu[2] / n2) + rabs(mu[3] / n2);
    s3 = rabs(mu[4] / n2) + rabs(mu[5] / n2) + rabs(mu[6] / n2) + rabs(mu[7] / n2);
    tol[0] = 2.0 * e2 + 1e-7;
    tol[1] = 8.0 * s2 * e2 + 1e-8;
    tol[2] = 32.0 * s3 * e3 + 1e-9;
    tol[3] = 32.0 * s3 * e3 + 1e-9;
    tol[4] = 256.0 * s3 * s3 * s3 * e3 + 1e-10;
    tol[5] = 64.0 * (s2 * s3 * e3 + s3 * s3 * e2) + 1e-10;
    tol[6] = 256.0 * s3 * s3 * s3 * e3 + 1e-10;
  endfunction

  task automatic run(input image_t im, input string name, output feature_vec_t res);
    real r [7], tol [7];
    int cyc;
    img = im;
    ref_hu(im, W, H, r);
    tolerances(im, tol);
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    cyc = 0;
    while (!hu_valid) begin
      @(posedge clk); #1; cyc++;
    end
    check({name, " latency"}, cyc == W * H + 7);
    if (cyc != W * H + 7) $display("  latency %0d", cyc);
    for (int k = 0; k < 7; k++) begin
      if (!close(hu[k], r[k], 1e-4, tol[k])) $display("  %s I%0d got %g ref %g", name, k + 1, fp2real(hu[k]), r[k]);
      check({name, " hu"}, close(hu[k], r[k], 1e-4, tol[k]));
    end
    res = hu;
    @(posedge clk); #1;
    check({name, " idle"}, !busy);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    feature_vec_t a, b;
    for (int y = 0; y < 32; y++) img[y] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(class1_image(), "class I", a);
    run(shift_image(class1_image(), W, H, 2, 3), "class I moved", b);
    for (int k = 0; k < 4; k++) check("translation invariance", close(b[k], fp2real(a[k]), 1e-3, 1e-7));
    run(class2_image(), "class II", a);
    run(rot90_image(class2_image(), W), "class II rotated", b);
    for (int k = 0; k < 4; k++) check("rotation invariance", close(b[k], fp2real(a[k]), 1e-3, 1e-7));
    for (int i = 0; i < 30; i++) run(random_blob(W, H), "random", a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
