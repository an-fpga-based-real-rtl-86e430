// moment_accumulator: raw geometric moments of a binary image.
//
// After a start pulse it walks the image row by row, x (column) fastest,
// one pixel per clock, and for every object pixel adds x^p * y^q into the
// ten raw moments M00, M10, M01, M11, M20, M02, M21, M12, M30, M03
// (coordinates counted from 0). As in the design description the work is
// split into three phases, here pipeline stages:
//   phase 1: M00 += 1, M10 += x, M01 += y, M11 += x*y; form x^2 and y^2
//   phase 2: M20 += x^2, M02 += y^2, M21 += x^2*y, M12 += x*y^2;
//            form x^3 and y^3
//   phase 3: M30 += x^3, M03 += y^3
// The one-pixel-per-clock pipelining is this design's choice (the
// description's scan takes several clocks per pixel).
// Interface: rd_x/rd_y address the image buffer, whose pixel arrives on
// rd_pix one clock later. done pulses for one clock, rising IMG_W*IMG_H + 3
// clocks after the edge that samples start; moments then holds the result until the next start.
// A start while busy is ignored.
module moment_accumulator
  import ic_pkg::*;
#(
  parameter int IMG_W = 20,
  parameter int IMG_H = 20,
  localparam int XW = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int YW = (IMG_H > 1) ? $clog2(IMG_H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [XW-1:0] rd_x,
  output logic [YW-1:0] rd_y,
  input  logic          rd_pix,
  output raw_moments_t  moments,
  output logic          busy,
  output logic          done
);

  // coordinate and power registers share the accumulator width MOM_W
  localparam int CW = MOM_W;

  logic          scanning;
  logic          last_addr;
  // phase 0 -> 1: address issued, pixel arrives next clock
  logic          v0, last0;
  logic [CW-1:0] x0, y0;
  // phase 1 -> 2
  logic          v1, p1, last1;
  logic [CW-1:0] x1, y1, xx1, yy1;
  // phase 2 -> 3
  logic          v2, p2, last2;
  logic [CW-1:0] xxx2, yyy2;

  raw_moments_t  acc;

  assign last_addr = (int'(rd_x) == IMG_W - 1) && (int'(rd_y) == IMG_H - 1);
  assign busy      = scanning | v0 | v1 | v2;

  // address generator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanning <= 1'b0;
      rd_x     <= '0;
      rd_y     <= '0;
    end else if (!scanning) begin
      if (start && !busy) begin
        scanning <= 1'b1;
        rd_x     <= '0;
        rd_y     <= '0;
      end
    end else begin
      if (last_addr) begin
        scanning <= 1'b0;
      end else if (int'(rd_x) == IMG_W - 1) begin
        rd_x <= '0;
        rd_y <= rd_y + 1'b1;
      end else begin
        rd_x <= rd_x + 1'b1;
      end
    end
  end

  // pipeline and accumulators
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; last0 <= 1'b0; x0 <= '0; y0 <= '0;
      v1 <= 1'b0; p1 <= 1'b0; last1 <= 1'b0;
      x1 <= '0; y1 <= '0; xx1 <= '0; yy1 <= '0;
      v2 <= 1'b0; p2 <= 1'b0; last2 <= 1'b0; xxx2 <= '0; yyy2 <= '0;
      acc  <= '0;
      done <= 1'b0;
    end else begin
      if (start && !busy) acc <= '0;

      // phase 0: remember the address whose pixel arrives next clock
      v0    <= scanning;
      last0 <= scanning & last_addr;
      x0    <= CW'(rd_x);
      y0    <= CW'(rd_y);

      // phase 1
      v1    <= v0;
      p1    <= v0 & rd_pix;
      last1 <= last0;
      x1    <= x0;
      y1    <= y0;
      xx1   <= x0 * x0;
      yy1   <= y0 * y0;
      if (v0 && rd_pix) begin
        acc.m00 <= acc.m00 + 1'b1;
        acc.m10 <= acc.m10 + x0;
        acc.m01 <= acc.m01 + y0;
        acc.m11 <= acc.m11 + x0 * y0;
      end

      // phase 2
      v2    <= v1;
      p2    <= p1;
      last2 <= last1;
      xxx2  <= xx1 * x1;
      yyy2  <= yy1 * y1;
      if (p1) begin
        acc.m20 <= acc.m20 + xx1;
        acc.m02 <= acc.m02 + yy1;
        acc.m21 <= acc.m21 + xx1 * y1;
        acc.m12 <= acc.m12 + x1 * yy1;
      end

      // phase 3
      if (p2) begin
        acc.m30 <= acc.m30 + xxx2;
        acc.m03 <= acc.m03 + yyy2;
      end
      done <= v2 & last2;
    end
  end

  assign moments = acc;

  // the address generator never leaves the image
  a_addr_in_image: assert property (@(posedge clk) disable iff (!rst_n)
    scanning |-> (int'(rd_x) < IMG_W && int'(rd_y) < IMG_H))
    else $error("moment_accumulator: address outside the image");

endmodule
