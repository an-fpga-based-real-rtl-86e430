// tb_image_classifier: the whole classifier at its default size (20x20
// images, eight neurons). A Kohonen map is loaded whose neurons 0-3 sit
// around the invariants of the class I shape (a filled rectangle) and
// neurons 4-7 around those of the class II shape (an L), with tags
// 32'h7 and 32'h10. Twenty unknown images, moved and rotated copies of
// the two shapes, are uploaded and classified; each must get its class,
// the invariants must match a double-precision reference, and the result
// times must be the pipeline's 407 clocks (invariants) and 440 clocks
// (class) after the edge that samples start. The mechanisms of the design
// are counted and each must occur: a start ignored while busy, a winner
// found after the first neuron (the running minimum replaced), a winner
// that is the first neuron, a classification started right after the
// previous one, an empty image (centroid division by zero), and grey
// images binarised by the thresholder, which then starts the
// classification by itself; their threshold must fall in the gap between
// the object and background grey levels, the raw moments must be those of
// the binary shape, and bin_done must come 2*W*H + 256 clocks after
// binarise, the class 441 clocks after that.
// The two shapes, the tags 7 and 0x10 and the 20x20 size follow
// the design description's test images and outputs; the unknown images
// and the map built around the shapes are this testbench's own.
module tb_image_classifier;
  import tb_pkg::*;
  import ic_pkg::*;
  localparam int W = 20, H = 20, N = 8;
  localparam logic [31:0] TAG_I = 32'h0000_0007, TAG_II = 32'h0000_0010;

  logic clk = 0, rst_n = 0;
  logic pix_we = 0, pix_val = 0, w_we = 0, start = 0;
  logic [4:0] pix_x = 0, pix_y = 0;
  logic [11:0] w_addr = 0;
  logic g_we = 0, binarise = 0;
  logic [4:0] g_x = 0, g_y = 0;
  logic [7:0] g_grey = 0;
  logic bin_done, thr_found;
  logic [7:0] threshold;
  logic [31:0] w_data = 0;
  logic busy, hu_valid, class_valid;
  raw_moments_t raw;
  feature_vec_t hu;
  logic [31:0] class_tag, min_dist;
  logic [2:0] winner;
  int checks = 0, failures = 0, correct = 0, unknown = 0;
  int n_ignored = 0, n_replaced = 0, n_first = 0, n_back2back = 0, n_empty = 0, n_binarised = 0;

  image_classifier dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic upload(input image_t im);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk);
      pix_we = 1; pix_x = 5'(x); pix_y = 5'(y); pix_val = im[y][x];
    end
    @(negedge clk) pix_we = 0;
  endtask

  task automatic load_map();
    real a [7], b [7];
    real f;
    ref_hu(class1_image(), W, H, a);
    ref_hu(class2_image(), W, H, b);
    for (int n = 0; n < N; n++) begin
      f = 1.0 + 0.03 * real'((n % 4) - 2);      // spread the neurons of a class
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        w_we = 1;
        w_addr = 12'(n * 8 + k);
        if (k == 7) w_data = (n < 4) ? TAG_I : TAG_II;
        else        w_data = real2fp(((n < 4) ? a[k] : b[k]) * f);
      end
    end
    @(negedge clk) w_we = 0;
  endtask

  // classify the uploaded image; expect = 0 skips the class check
  task automatic classify(input image_t im, input logic [31:0] expect_tag, input string name, input bit poke);
    real r [7];
    int cyc, t_hu;
    bit got_hu;
    ref_hu(im, W, H, r);
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    cyc = 0; got_hu = 0; t_hu = 0;
    while (!class_valid) begin
      @(posedge clk); #1; cyc++;
      if (poke && cyc == 100) begin
        // a second start while busy must change nothing
        start = 1;
        @(posedge clk); #1; cyc++;
        start = 0;
        if (busy) n_ignored++;
      end
      if (hu_valid) begin
        got_hu = 1; t_hu = cyc;
        for (int k = 0; k < 7; k++)
          check({name, " invariant"}, close(hu[k], r[k], 1e-3, 1e-6));
      end
    end
    check({name, " invariants seen"}, got_hu && t_hu == W * H + 7);
    check({name, " class latency"}, cyc == W * H + 7 + 4 * 6 + N + 1);
    if (cyc != W * H + 7 + 4 * 6 + N + 1) $display("  %s: hu at %0d, class at %0d", name, t_hu, cyc);
    if (expect_tag != 0) begin
      unknown++;
      if (class_tag == expect_tag) correct++;
      check({name, " class"}, class_tag == expect_tag);
      check({name, " winner group"}, (expect_tag == TAG_I) == (winner < 4));
    end
    if (winner != 0) n_replaced++; else n_first++;
  endtask

  // Grey version of a binary image: dark object (30..70) on a bright
  // background (180..240), binarised and classified by the design itself.
  task automatic classify_grey(input image_t im, input logic [31:0] expect_tag, input string name);
    longint m [10];
    int cyc, t_bin;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk);
      g_we = 1; g_x = 5'(x); g_y = 5'(y);
      g_grey = im[y][x] ? 8'(30 + $urandom_range(40)) : 8'(180 + $urandom_range(60));
    end
    @(negedge clk) g_we = 0;
    binarise = 1;
    @(posedge clk);
    @(negedge clk) binarise = 0;
    cyc = 0; t_bin = 0;
    while (!class_valid && cyc < 5000) begin
      @(posedge clk); #1; cyc++;
      if (bin_done) t_bin = cyc;
    end
    check({name, " binarise time"}, t_bin == 2 * W * H + 256);
    check({name, " class time"}, cyc == t_bin + 1 + W * H + 7 + 4 * 6 + N + 1);
    if (t_bin != 2 * W * H + 256 || cyc != t_bin + 1 + W * H + 7 + 4 * 6 + N + 1)
      $display("  %s: bin_done at %0d, class at %0d", name, t_bin, cyc);
    check({name, " threshold found"}, thr_found);
    check({name, " threshold in the gap"}, threshold >= 70 && threshold < 180);
    ref_raw(im, W, H, m);
    check({name, " raw moments"},
          raw.m00 == 32'(m[0]) && raw.m10 == 32'(m[1]) && raw.m01 == 32'(m[2]) &&
          raw.m11 == 32'(m[3]) && raw.m20 == 32'(m[4]) && raw.m02 == 32'(m[5]) &&
          raw.m21 == 32'(m[6]) && raw.m12 == 32'(m[7]) && raw.m30 == 32'(m[8]) &&
          raw.m03 == 32'(m[9]));
    unknown++;
    if (class_tag == expect_tag) correct++;
    check({name, " class"}, class_tag == expect_tag);
    n_binarised++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    image_t im, empty;
    for (int y = 0; y < 32; y++) empty[y] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_map();
    // twenty unknown images, ten of each class
    for (int i = 0; i < 20; i++) begin
      im = (i < 10) ? class1_image() : class2_image();
      case (i % 5)
        0: ;
        1: im = shift_image(im, W, H, 1, 2);
        2: im = shift_image(im, W, H, -2, 3);
        3: im = rot90_image(im, W);
        4: im = shift_image(rot90_image(im, W), W, H, 0, -1);
        default: ;
      endcase
      upload(im);
      classify(im, (i < 10) ? TAG_I : TAG_II, (i < 10) ? "class I" : "class II", i == 3);
    end
    // back to back: the same image again, started at once
    classify(im, TAG_II, "back to back", 0);
    n_back2back++;
    // empty image: the centroid division has a zero divisor
    upload(empty);
    classify(empty, 0, "empty", 0);
    check("empty image gives zero invariants", hu == '0);
    n_empty++;
    // grey images through the thresholder; the binary buffer first holds
    // the other class, so a correct result shows it was overwritten
    upload(class2_image());
    classify_grey(shift_image(class1_image(), W, H, 1, 1), TAG_I, "grey class I");
    upload(class1_image());
    classify_grey(rot90_image(class2_image(), W), TAG_II, "grey class II");
    $display("accuracy %0d of %0d unknown images", correct, unknown);
    $display("mechanisms: start ignored %0d, minimum replaced %0d, first neuron wins %0d, back to back %0d, empty image %0d, binarised %0d",
             n_ignored, n_replaced, n_first, n_back2back, n_empty, n_binarised);
    check("start ignored while busy happened", n_ignored > 0);
    check("running minimum replaced happened", n_replaced > 0);
    check("first neuron won", n_first > 0);
    check("back to back happened", n_back2back > 0);
    check("empty image happened", n_empty > 0);
    check("binarisation happened", n_binarised > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
