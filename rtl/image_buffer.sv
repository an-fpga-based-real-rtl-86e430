// image_buffer: on-chip store for one binarised image.
//
// Holds IMG_W x IMG_H one-bit pixels, 1 marking an object (black) pixel
// and 0 the background, the polarity the design description uses. Pixels
// are written one at a time through the upload port, which stands in for
// the camera path; the moment accumulator reads one pixel per cycle.
// Read latency is one clock (rd_pix shows the pixel addressed on the
// previous edge). The 20x20 default size follows the description; the
// upload port, the synchronous read and the reset-to-background are this
// design's own choices.
module image_buffer #(
  parameter int IMG_W = 20,
  parameter int IMG_H = 20,
  localparam int XW = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int YW = (IMG_H > 1) ? $clog2(IMG_H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [XW-1:0] wr_x,
  input  logic [YW-1:0] wr_y,
  input  logic          wr_pix,
  input  logic [XW-1:0] rd_x,
  input  logic [YW-1:0] rd_y,
  output logic          rd_pix
);

  logic [IMG_W-1:0] rows [IMG_H];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < IMG_H; r++) rows[r] <= '0;
    end else if (wr_en && int'(wr_x) < IMG_W && int'(wr_y) < IMG_H) begin
      rows[wr_y][wr_x] <= wr_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      rd_pix <= 1'b0;
    else if (int'(rd_x) < IMG_W && int'(rd_y) < IMG_H)
      rd_pix <= rows[rd_y][rd_x];
    else
      rd_pix <= 1'b0;
  end

endmodule
