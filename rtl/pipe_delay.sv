// pipe_delay: a valid-qualified delay line of STAGES registers.
//
// Carries a data word and its valid bit through STAGES flip-flop stages,
// so out_valid/out_data follow in_valid/in_data by STAGES clocks. It models
// the pipeline latency of a floating-point operator whose arithmetic is
// written as one combinational function in front of it; synthesis can
// retime the logic into the stages. STAGES must be at least 1.
// The design description uses pipelined floating-point cores
// without stating their depth; this delay line and its depth are this
// design's own.
module pipe_delay #(
  parameter int W      = 32,
  parameter int STAGES = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic         v [STAGES];
  logic [W-1:0] d [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) begin
        v[i] <= 1'b0;
        d[i] <= '0;
      end
    end else begin
      v[0] <= in_valid;
      d[0] <= in_data;
      for (int i = 1; i < STAGES; i++) begin
        v[i] <= v[i-1];
        d[i] <= d[i-1];
      end
    end
  end

  assign out_valid = v[STAGES-1];
  assign out_data  = d[STAGES-1];

endmodule
