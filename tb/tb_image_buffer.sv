// tb_image_buffer: writes random images pixel by pixel and reads every
// pixel back, checking the value and the one-clock read latency; also
// checks that reset clears the image and that an out-of-range read gives 0.
// The 20x20 size follows the design description; the port
// behaviour checked is this design's own.
module tb_image_buffer;
  import tb_pkg::*;
  localparam int W = 20, H = 20;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_pix = 0, rd_pix;
  logic [4:0] wr_x = 0, rd_x = 0;
  logic [4:0] wr_y = 0, rd_y = 0;
  int checks = 0, failures = 0;
  logic model [H][W];

  image_buffer #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // after reset the image is background
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk); rd_x = 5'(x); rd_y = 5'(y);
      @(posedge clk); #1;
      check("reset clear", rd_pix == 1'b0);
    end
    for (int pass = 0; pass < 3; pass++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        @(negedge clk);
        model[y][x] = 1'($urandom);
        wr_en = 1; wr_x = 5'(x); wr_y = 5'(y); wr_pix = model[y][x];
      end
      @(negedge clk) wr_en = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        @(negedge clk); rd_x = 5'(x); rd_y = 5'(y);
        @(posedge clk); #1;
        check("readback", rd_pix == model[y][x]);
      end
    end
    // one-clock latency: the pixel changes only after the edge
    @(negedge clk); rd_x = 0; rd_y = 0;
    @(posedge clk); #1;
    @(negedge clk); rd_x = 1;
    #1 check("latency hold", rd_pix == model[0][0]);
    @(posedge clk); #1 check("latency update", rd_pix == model[0][1]);
    @(negedge clk); rd_x = 5'd25; rd_y = 0;
    @(posedge clk); #1 check("out of range", rd_pix == 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
