// tb_otsu_thresholder: uploads grey images to two thresholders (20x20
// with 8-bit grey, and 7x5 with 4-bit grey) and checks the chosen
// threshold, the found flag, every binarised pixel written out and the
// result time 2*W*H + 2^GREY_W clocks. The reference evaluates the
// between-class variance w0*w1*(mean0 - mean1)^2 for every level in
// wide integer arithmetic, written as (s0*w1 - s1*w0)^2 / (w0*w1), and
// takes the first maximum. Images: a dark shape on a bright background
// with noise, random grey noise, a two-level image and a flat image (no
// threshold, all background). A start during a run must be ignored.
// Otsu's criterion follows the thresholder the design description names;
// the images and the small second configuration are this testbench's own.
module tb_otsu_thresholder;
  localparam int W = 20, H = 20, G = 8;
  localparam int W2 = 7, H2 = 5, G2 = 4;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, n_ignored = 0;

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Large configuration.
  logic in_we = 0, start = 0;
  logic [4:0] in_x = 0, in_y = 0;
  logic [G-1:0] in_grey = 0;
  logic busy, out_we, out_pix, done, found;
  logic [4:0] out_x, out_y;
  logic [G-1:0] threshold;
  otsu_thresholder dut (.clk, .rst_n, .in_we, .in_x, .in_y, .in_grey, .start, .busy,
                        .out_we, .out_x, .out_y, .out_pix, .done, .found, .threshold);

  // Small configuration.
  logic in_we2 = 0, start2 = 0;
  logic [2:0] in_x2 = 0, in_y2 = 0;
  logic [G2-1:0] in_grey2 = 0;
  logic busy2, out_we2, out_pix2, done2, found2;
  logic [2:0] out_x2, out_y2;
  logic [G2-1:0] threshold2;
  otsu_thresholder #(.IMG_W(W2), .IMG_H(H2), .GREY_W(G2)) dut2 (
    .clk, .rst_n, .in_we(in_we2), .in_x(in_x2), .in_y(in_y2), .in_grey(in_grey2),
    .start(start2), .busy(busy2), .out_we(out_we2), .out_x(out_x2), .out_y(out_y2),
    .out_pix(out_pix2), .done(done2), .found(found2), .threshold(threshold2));

  int img [32][32];

  // Reference Otsu threshold; returns -1 when no level splits the image.
  function automatic int ref_threshold(int w, int h, int levels);
    logic [127:0] best_n, best_d, n, d;
    longint hist [256];
    longint total, w0, s0, w1, s1, npix;
    logic signed [127:0] diff;
    int best = -1;
    for (int l = 0; l < 256; l++) hist[l] = 0;
    total = 0;
    npix  = w * h;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        hist[img[r][c]]++;
        total += img[r][c];
      end
    w0 = 0; s0 = 0; best_n = 0; best_d = 1;
    for (int t = 0; t < levels; t++) begin
      w0 += hist[t];
      s0 += t * hist[t];
      w1 = npix - w0;
      s1 = total - s0;
      if (w0 > 0 && w1 > 0) begin
        diff = 128'(s0) * 128'(w1) - 128'(s1) * 128'(w0);
        if (diff < 0) diff = -diff;
        n = diff * diff;
        d = 128'(w0) * 128'(w1);
        if (best < 0 || n * best_d > best_n * d) begin
          best = t; best_n = n; best_d = d;
        end
      end
    end
    return best;
  endfunction

  function automatic void make_image(int kind, int w, int h, int levels);
    int cx = $urandom_range(w - 1), cy = $urandom_range(h - 1);
    int rx = $urandom_range(w / 2) + 1, ry = $urandom_range(h / 2) + 1;
    int dark = $urandom_range(levels / 4), bright = levels - 1 - $urandom_range(levels / 4);
    int noise = levels / 8;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int v;
        case (kind)
          0: begin
            v = ((c - cx) * (c - cx) * ry * ry + (r - cy) * (r - cy) * rx * rx <= rx * rx * ry * ry)
                ? dark : bright;
            v += int'($urandom_range(2 * noise)) - noise;
          end
          1: v = $urandom_range(levels - 1);
          2: v = ($urandom_range(1) != 0) ? dark : bright;
          default: v = dark;
        endcase
        if (v < 0) v = 0;
        if (v > levels - 1) v = levels - 1;
        img[r][c] = v;
      end
  endfunction

  task automatic run_large(int kind, bit poke);
    int exp_t, cyc, writes;
    bit seen [32][32];
    make_image(kind, W, H, 1 << G);
    exp_t = ref_threshold(W, H, 1 << G);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        in_we = 1; in_x = 5'(c); in_y = 5'(r); in_grey = G'(img[r][c]);
        seen[r][c] = 0;
      end
    @(negedge clk) in_we = 0;
    start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 0; writes = 0;
    while (1) begin
      @(posedge clk); #1; cyc++;
      if (poke && cyc == 50) begin
        // A second start and an upload while busy must change nothing.
        start = 1; in_we = 1; in_x = 0; in_y = 0; in_grey = ~in_grey;
        @(posedge clk); #1; cyc++;
        start = 0; in_we = 0;
        n_ignored++;
      end
      if (out_we) begin
        bit e = (exp_t >= 0) && (img[out_y][out_x] <= exp_t);
        writes++;
        check("pixel in range", out_x < W && out_y < H);
        if (out_x < W && out_y < H) begin
          check("pixel written once", !seen[out_y][out_x]);
          seen[out_y][out_x] = 1;
          check("binarised pixel", out_pix == e);
        end
      end
      if (done || cyc > 4 * W * H + 1000) break;
    end
    check("large: done", done);
    check("large: time", cyc == 2 * W * H + (1 << G));
    check("large: writes", writes == W * H);
    check("large: found", found == (exp_t >= 0));
    if (exp_t >= 0) check("large: threshold", int'(threshold) == exp_t);
    if (exp_t >= 0 && int'(threshold) != exp_t)
      $display("  kind %0d: threshold %0d expected %0d", kind, threshold, exp_t);
    @(negedge clk);
    check("large: idle", !busy);
  endtask

  task automatic run_small(int kind);
    int exp_t, cyc, writes;
    make_image(kind, W2, H2, 1 << G2);
    exp_t = ref_threshold(W2, H2, 1 << G2);
    for (int r = 0; r < H2; r++)
      for (int c = 0; c < W2; c++) begin
        @(negedge clk);
        in_we2 = 1; in_x2 = 3'(c); in_y2 = 3'(r); in_grey2 = G2'(img[r][c]);
      end
    @(negedge clk) in_we2 = 0;
    start2 = 1;
    @(posedge clk); #1 start2 = 0;
    cyc = 0; writes = 0;
    while (1) begin
      @(posedge clk); #1; cyc++;
      if (out_we2) begin
        writes++;
        check("small: binarised pixel",
              out_pix2 == ((exp_t >= 0) && (img[out_y2][out_x2] <= exp_t)));
      end
      if (done2 || cyc > 1000) break;
    end
    check("small: time", cyc == 2 * W2 * H2 + (1 << G2));
    check("small: writes", writes == W2 * H2);
    check("small: found", found2 == (exp_t >= 0));
    if (exp_t >= 0) check("small: threshold", int'(threshold2) == exp_t);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_large(0, 1);
    for (int i = 0; i < 6; i++) run_large(0, 0);
    run_large(1, 0);
    run_large(2, 0);
    run_large(3, 0);
    for (int i = 0; i < 30; i++) run_small(i % 4);
    check("start while busy tried", n_ignored > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
