// otsu_thresholder: binarises a grey-level image with Otsu's threshold.
//
// A grey frame of IMG_W x IMG_H pixels, GREY_W bits each, is uploaded
// pixel by pixel. A start pulse then runs three passes:
//   1. histogram: one pixel per clock, counting every grey level and
//      summing all grey values (IMG_W*IMG_H clocks);
//   2. search: one grey level t per clock (2^GREY_W clocks), keeping the
//      level that maximises the between-class variance of the classes
//      {g <= t} and {g > t}; with w0 pixels of grey sum s0 at or below t,
//      N pixels in all and grey sum S, that variance is proportional to
//        (N*s0 - w0*S)^2 / (w0*(N - w0)),
//      compared without division by cross-multiplying; the first (lowest)
//      level wins ties;
//   3. output: one pixel per clock (IMG_W*IMG_H clocks), writing
//      out_pix = 1 for an object pixel to (out_x, out_y) with out_we.
// With OBJECT_DARK = 1 the object is the dark class (g <= threshold),
// matching the image buffer's 1 = black object; 0 selects bright objects.
// An image with a single grey level has no threshold (found = 0) and is
// written as all background.
// Interface and timing: start and uploads are ignored while busy. done
// pulses together with the last output write, 2*IMG_W*IMG_H + 2^GREY_W
// clocks after the edge that samples start; threshold and found then hold
// until the next start.
// A thresholder that picks the binarisation level automatically before the
// moment calculation, named as Otsu's, is part of the design description;
// the integer formulation, the grey depth, the frame store and all timing
// are this design's own.
module otsu_thresholder #(
  parameter int IMG_W       = 20,
  parameter int IMG_H       = 20,
  parameter int GREY_W      = 8,
  parameter bit OBJECT_DARK = 1'b1,
  localparam int XW = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int YW = (IMG_H > 1) ? $clog2(IMG_H) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_we,
  input  logic [XW-1:0]     in_x,
  input  logic [YW-1:0]     in_y,
  input  logic [GREY_W-1:0] in_grey,
  input  logic              start,
  output logic              busy,
  output logic              out_we,
  output logic [XW-1:0]     out_x,
  output logic [YW-1:0]     out_y,
  output logic              out_pix,
  output logic              done,
  output logic              found,
  output logic [GREY_W-1:0] threshold
);

  localparam int NPIX   = IMG_W * IMG_H;
  localparam int LEVELS = 1 << GREY_W;
  localparam int NW     = $clog2(NPIX + 1);      // pixel counts
  localparam int SW     = NW + GREY_W;           // grey sums
  localparam int PW     = NW + SW + 1;           // N*s0 - w0*S, signed
  localparam int QW     = 2 * (NW + SW);         // its square
  localparam int DW     = 2 * NW;                // w0*(N - w0)
  localparam int CW     = QW + DW;               // cross products

  typedef enum logic [1:0] {IDLE, HIST, SEARCH, OUTPUT} state_t;
  state_t state;

  logic [GREY_W-1:0] frame [IMG_H][IMG_W];
  logic [NW-1:0]     hist  [LEVELS];
  logic [SW-1:0]     sum_all, s0;
  logic [NW-1:0]     w0;
  logic [XW-1:0]     x;
  logic [YW-1:0]     y;
  logic [GREY_W-1:0] t;
  logic [QW-1:0]     best_num;
  logic [DW-1:0]     best_den;
  logic [GREY_W-1:0] pix;
  logic              last_pix;

  assign pix      = frame[y][x];
  assign last_pix = (int'(x) == IMG_W - 1) && (int'(y) == IMG_H - 1);
  assign busy     = (state != IDLE);

  // Between-class measure of threshold t, from the running sums.
  logic [NW-1:0]        w0_n;
  logic [SW-1:0]        s0_n;
  logic signed [PW-1:0] diff;
  logic [PW-1:0]        diff_abs;
  logic [QW-1:0]        num;
  logic [DW-1:0]        den;
  logic                 better;

  always_comb begin
    w0_n     = w0 + hist[t];
    s0_n     = s0 + SW'(t) * SW'(hist[t]);
    diff     = $signed(PW'(NPIX) * PW'(s0_n)) - $signed(PW'(w0_n) * PW'(sum_all));
    diff_abs = diff[PW-1] ? PW'(-diff) : PW'(diff);
    num      = QW'(diff_abs) * QW'(diff_abs);
    den      = DW'(w0_n) * DW'(NW'(NPIX) - w0_n);
    better   = (den != '0) &&
               (!found || CW'(num) * CW'(best_den) > CW'(best_num) * CW'(den));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < IMG_H; r++)
        for (int c = 0; c < IMG_W; c++) frame[r][c] <= '0;
    end else if (in_we && !busy && int'(in_x) < IMG_W && int'(in_y) < IMG_H) begin
      frame[in_y][in_x] <= in_grey;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      for (int l = 0; l < LEVELS; l++) hist[l] <= '0;
      sum_all   <= '0;
      s0        <= '0;
      w0        <= '0;
      x         <= '0;
      y         <= '0;
      t         <= '0;
      best_num  <= '0;
      best_den  <= '0;
      found     <= 1'b0;
      threshold <= '0;
      out_we    <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_pix   <= 1'b0;
      done      <= 1'b0;
    end else begin
      out_we <= 1'b0;
      done   <= 1'b0;
      case (state)
        IDLE: if (start) begin
          for (int l = 0; l < LEVELS; l++) hist[l] <= '0;
          sum_all  <= '0;
          s0       <= '0;
          w0       <= '0;
          x        <= '0;
          y        <= '0;
          t        <= '0;
          best_num <= '0;
          best_den <= '0;
          found    <= 1'b0;
          state    <= HIST;
        end
        HIST: begin
          hist[pix] <= hist[pix] + 1'b1;
          sum_all   <= sum_all + SW'(pix);
          if (last_pix) begin
            x     <= '0;
            y     <= '0;
            state <= SEARCH;
          end else if (int'(x) == IMG_W - 1) begin
            x <= '0;
            y <= y + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end
        SEARCH: begin
          w0 <= w0_n;
          s0 <= s0_n;
          if (better) begin
            best_num  <= num;
            best_den  <= den;
            threshold <= t;
            found     <= 1'b1;
          end
          if (int'(t) == LEVELS - 1) state <= OUTPUT;
          t <= t + 1'b1;
        end
        OUTPUT: begin
          out_we  <= 1'b1;
          out_x   <= x;
          out_y   <= y;
          out_pix <= found && ((pix <= threshold) == OBJECT_DARK);
          if (last_pix) begin
            state <= IDLE;
            done  <= 1'b1;
          end else if (int'(x) == IMG_W - 1) begin
            x <= '0;
            y <= y + 1'b1;
          end else begin
            x <= x + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
