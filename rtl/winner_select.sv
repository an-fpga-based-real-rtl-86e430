// winner_select: sequential search for the winning neuron.
//
// On in_valid the NUM_NEURONS distances are captured and the running
// minimum is loaded with distance 0. On each of the next NUM_NEURONS-1
// clocks one more distance is compared and, if strictly smaller, becomes
// the minimum, so ties go to the lower index. This one-comparison-per-clock
// search is the one the design description uses. Distances are
// non-negative IEEE 754 numbers, so they are compared as unsigned
// integers. Timing: index/min_dist are valid with out_valid, which rises
// NUM_NEURONS clocks after in_valid (one clock to load, NUM_NEURONS-1 to
// compare). in_valid is ignored while a search is running (busy).
module winner_select
  import ic_pkg::*;
#(
  parameter int NUM_NEURONS = 8,
  localparam int IW = (NUM_NEURONS > 1) ? $clog2(NUM_NEURONS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  fp32_t         distances [NUM_NEURONS],
  output logic          busy,
  output logic          out_valid,
  output logic [IW-1:0] index,
  output fp32_t         min_dist
);

  fp32_t         d_r [NUM_NEURONS];
  logic [IW-1:0] i_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      index     <= '0;
      min_dist  <= '0;
      i_cur     <= '0;
      for (int n = 0; n < NUM_NEURONS; n++) d_r[n] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          d_r      <= distances;
          min_dist <= distances[0];
          index    <= '0;
          i_cur    <= IW'(1);
          busy     <= (NUM_NEURONS > 1);
          out_valid <= (NUM_NEURONS == 1);
        end
      end else begin
        if (min_dist > d_r[i_cur]) begin
          min_dist <= d_r[i_cur];
          index    <= i_cur;
        end
        if (int'(i_cur) == NUM_NEURONS - 1) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
        i_cur <= i_cur + 1'b1;
      end
    end
  end

  // distances are magnitudes: a set sign bit would break the unsigned compare
  a_non_negative: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !d_r[i_cur][31])
    else $error("winner_select: negative distance");

endmodule
