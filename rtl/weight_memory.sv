// weight_memory: the trained Kohonen map held on chip.
//
// Word address 8n+k holds weight k (k = 0..6, matching Hu invariant I(k+1))
// of neuron n, and address 8n+7 holds that neuron's identification tag,
// the class it stands for. This is the address map of the design
// description, whose map is trained off line and recalled from flash
// memory before classification. Here the map is loaded one 32-bit word per
// clock through the write port (writes beyond the NUM_NEURONS*8 words are
// ignored). All weights are visible at once on weights[n][k] so that the
// neurons run in parallel; the tag of neuron tag_idx appears on tag one
// clock after tag_idx. Reset clears the memory; the load port and reset
// behaviour are this design's own.
module weight_memory
  import ic_pkg::*;
#(
  parameter int NUM_NEURONS = 8,
  parameter int ADDR_W      = 12,
  localparam int IW = (NUM_NEURONS > 1) ? $clog2(NUM_NEURONS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  fp32_t             wr_data,
  output feature_vec_t      weights [NUM_NEURONS],
  input  logic [IW-1:0]     tag_idx,
  output logic [31:0]       tag
);

  localparam int DEPTH = NUM_NEURONS * WORDS_PER_NEURON;
  localparam int AW    = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (wr_en && int'(wr_addr) < DEPTH) begin
      mem[wr_addr[AW-1:0]] <= wr_data;
    end
  end

  always_comb begin
    for (int n = 0; n < NUM_NEURONS; n++)
      for (int k = 0; k < NUM_FEATURES; k++)
        weights[n][k] = mem[n * WORDS_PER_NEURON + k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     tag <= '0;
    else if (int'(tag_idx) < NUM_NEURONS)
      tag <= mem[int'(tag_idx) * WORDS_PER_NEURON + NUM_FEATURES];
  end

endmodule
