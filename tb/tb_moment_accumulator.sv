// tb_moment_accumulator: scans known and random images held in a
// behavioural one-clock-latency memory and compares the ten raw moments
// with sums worked out from the definition; checks that done comes
// IMG_W*IMG_H + 3 clocks after start and that a start during a scan is
// ignored.
// The ten moments and the 20x20 size follow the design
// description; the one-pixel-per-clock timing checked is this design's own.
module tb_moment_accumulator;
  import tb_pkg::*;
  import ic_pkg::*;
  localparam int W = 20, H = 20;

  logic clk = 0, rst_n = 0, start = 0, rd_pix = 0, busy, done;
  logic [4:0] rd_x, rd_y;
  raw_moments_t moments;
  image_t img;
  int checks = 0, failures = 0;

  moment_accumulator #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) rd_pix <= img[rd_y][rd_x];

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input image_t im, input string name, input bit poke);
    longint m [10];
    int cyc;
    img = im;
    ref_raw(im, W, H, m);
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
      if (poke && cyc == 50) begin
        start = 1;       // must be ignored
        @(posedge clk); #1; cyc++;
        start = 0;
      end
    end
    check({name, " latency"}, cyc == W * H + 3);
    if (cyc != W * H + 3) $display("  latency %0d", cyc);
    check({name, " M00"}, moments.m00 == 32'(m[0]));
    check({name, " M10"}, moments.m10 == 32'(m[1]));
    check({name, " M01"}, moments.m01 == 32'(m[2]));
    check({name, " M11"}, moments.m11 == 32'(m[3]));
    check({name, " M20"}, moments.m20 == 32'(m[4]));
    check({name, " M02"}, moments.m02 == 32'(m[5]));
    check({name, " M21"}, moments.m21 == 32'(m[6]));
    check({name, " M12"}, moments.m12 == 32'(m[7]));
    check({name, " M30"}, moments.m30 == 32'(m[8]));
    check({name, " M03"}, moments.m03 == 32'(m[9]));
    @(posedge clk); #1;
    check({name, " done is a pulse"}, !done && !busy);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    image_t full;
    for (int y = 0; y < 32; y++) full[y] = '1;
    for (int y = 0; y < 32; y++) img[y] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(class1_image(), "class I", 0);
    run(class2_image(), "class II", 1);
    run(full, "full frame", 0);
    for (int i = 0; i < 10; i++) run(random_blob(W, H), "random", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
