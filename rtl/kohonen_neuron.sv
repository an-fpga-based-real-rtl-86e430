// kohonen_neuron: one classification neuron (Manhattan distance).
//
// Computes d = sum_k |x[k] - w[k]| over the seven Hu invariants with the
// structure of the design description: seven parallel subtractions, the
// absolute value by clearing the sign bit, and an adder tree
//   d = ((|e0| + |e1|) + |e6|) + ((|e2| + |e3|) + (|e4| + |e5|)).
// Each of the four floating-point levels (subtract, then three adder
// levels) is followed by FP_LAT pipeline registers, standing in for a
// pipelined floating-point core; FP_LAT is this design's parameter.
// Every operation is an fp_addsub unit; their overflow and underflow
// flags are not used (results saturate or flush, never turn infinite).
// Timing: distance/out_valid appear 4*FP_LAT clocks after in_valid. A new
// input may be applied every clock.
module kohonen_neuron
  import ic_pkg::*;
#(
  parameter int FP_LAT = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  feature_vec_t x,
  input  feature_vec_t w,
  output logic         out_valid,
  output fp32_t        distance
);

  // level 0: |x - w|, seven fp_addsub units subtracting
  feature_vec_t diff, e_c, e;
  logic         v0;
  for (genvar k = 0; k < NUM_FEATURES; k++) begin : g_sub
    fp_addsub u_sub (.a(x[k]), .b(w[k]), .sub(1'b1), .y(diff[k]), .overflow(), .underflow());
    assign e_c[k] = diff[k] & FP_ABS_MASK;
  end

  pipe_delay #(.W($bits(feature_vec_t)), .STAGES(FP_LAT)) u_l0 (
    .clk, .rst_n, .in_valid, .in_data(e_c), .out_valid(v0), .out_data(e));

  // level 1: three pair sums
  fp32_t p01, p23, p45;
  logic [3*32-1:0] s1;
  logic            v1;
  fp_addsub u_a01 (.a(e[0]), .b(e[1]), .sub(1'b0), .y(p01), .overflow(), .underflow());
  fp_addsub u_a23 (.a(e[2]), .b(e[3]), .sub(1'b0), .y(p23), .overflow(), .underflow());
  fp_addsub u_a45 (.a(e[4]), .b(e[5]), .sub(1'b0), .y(p45), .overflow(), .underflow());
  pipe_delay #(.W(3*32), .STAGES(FP_LAT)) u_l1 (
    .clk, .rst_n, .in_valid(v0), .in_data({p45, p23, p01}), .out_valid(v1), .out_data(s1));

  // seventh term travels alongside level 1 (its valid equals v1)
  fp32_t e6_d;
  pipe_delay #(.W(32), .STAGES(FP_LAT)) u_l1b (
    .clk, .rst_n, .in_valid(v0), .in_data(e[6]), .out_valid(), .out_data(e6_d));

  // level 2
  fp32_t q016, q2345;
  logic [2*32-1:0] s2;
  logic            v2;
  fp_addsub u_a016  (.a(s1[31:0]), .b(e6_d), .sub(1'b0), .y(q016), .overflow(), .underflow());
  fp_addsub u_a2345 (.a(s1[63:32]), .b(s1[95:64]), .sub(1'b0), .y(q2345), .overflow(), .underflow());
  pipe_delay #(.W(2*32), .STAGES(FP_LAT)) u_l2 (
    .clk, .rst_n, .in_valid(v1), .in_data({q2345, q016}), .out_valid(v2), .out_data(s2));

  // level 3
  fp32_t d_c;
  fp_addsub u_a_all (.a(s2[31:0]), .b(s2[63:32]), .sub(1'b0), .y(d_c), .overflow(), .underflow());
  pipe_delay #(.W(32), .STAGES(FP_LAT)) u_l3 (
    .clk, .rst_n, .in_valid(v2), .in_data(d_c), .out_valid(out_valid), .out_data(distance));

endmodule
