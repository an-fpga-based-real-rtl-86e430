// kohonen_classifier: classification mode of the Kohonen map.
//
// NUM_NEURONS kohonen_neuron instances compute, in parallel, the Manhattan
// distance between the incoming Hu invariants and each neuron's weights.
// winner_select then compares the distances one per clock and keeps the
// smallest; the index of that winning node addresses the weight memory's
// tag words, and the identification tag read there is the class of the
// object. This is the classification flow of the design description
// (eight parallel neurons, sequential minimum search, tag lookup).
// Interface: weights and tag come from weight_memory, tag_idx goes to it.
// Timing: class_valid pulses 4*FP_LAT + NUM_NEURONS clocks after the edge
// that samples in_valid (32 clocks at the defaults, 320 ns at a 10 ns
// clock). busy is high from the clock after in_valid until the clock
// before class_valid, so a new input may be applied with class_valid.
module kohonen_classifier
  import ic_pkg::*;
#(
  parameter int NUM_NEURONS = 8,
  parameter int FP_LAT      = 6,
  localparam int IW = (NUM_NEURONS > 1) ? $clog2(NUM_NEURONS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  feature_vec_t  hu,
  input  feature_vec_t  weights [NUM_NEURONS],
  output logic [IW-1:0] tag_idx,
  input  logic [31:0]   tag,
  output logic          busy,
  output logic          class_valid,
  output logic [31:0]   class_tag,
  output logic [IW-1:0] winner,
  output fp32_t         min_dist
);

  fp32_t distances [NUM_NEURONS];
  logic  d_valid [NUM_NEURONS];
  logic  sel_busy, sel_valid, tag_pending, in_flight;

  for (genvar n = 0; n < NUM_NEURONS; n++) begin : g_neuron
    kohonen_neuron #(.FP_LAT(FP_LAT)) u_neuron (
      .clk, .rst_n, .in_valid, .x(hu), .w(weights[n]),
      .out_valid(d_valid[n]), .distance(distances[n])
    );
  end

  winner_select #(.NUM_NEURONS(NUM_NEURONS)) u_sel (
    .clk, .rst_n, .in_valid(d_valid[0]), .distances, .busy(sel_busy),
    .out_valid(sel_valid), .index(winner), .min_dist
  );

  // the tag of the winner is read one clock after the search ends
  assign tag_idx   = winner;
  assign class_tag = tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_pending <= 1'b0;
      in_flight   <= 1'b0;
    end else begin
      tag_pending <= sel_valid;
      if (in_valid)       in_flight <= 1'b1;
      else if (sel_valid) in_flight <= 1'b0;
    end
  end

  assign class_valid = tag_pending;
  assign busy        = in_flight;

  // the search only runs inside an accepted request
  a_search_in_flight: assert property (@(posedge clk) disable iff (!rst_n)
    sel_busy |-> in_flight)
    else $error("kohonen_classifier: winner search outside a request");

endmodule
