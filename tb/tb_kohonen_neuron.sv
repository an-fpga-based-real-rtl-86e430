// tb_kohonen_neuron: random Hu vectors and weights, one new input every
// clock, against the Manhattan distance summed in double precision;
// checks the 4*FP_LAT latency and that results come out in order.
// The L1 distance and its adder tree follow the design description;
// the pipeline depth checked is this design's own.
module tb_kohonen_neuron;
  import tb_pkg::*;
  import ic_pkg::*;
  localparam int LAT = 6;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  feature_vec_t x, w;
  logic [31:0] distance;
  int checks = 0, failures = 0;
  real expq [$];
  int  tin [$];
  int  cycle = 0;

  kohonen_neuron #(.FP_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // collect results
  always @(posedge clk) if (rst_n && out_valid) begin
    real e;
    int t;
    e = expq.pop_front();
    t = tin.pop_front();
    check("distance", close(distance, e, 1e-6, 0.0));
    check("latency", cycle - t == 4 * LAT);
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      d = 0.0;
      for (int k = 0; k < 7; k++) begin
        x[k] = rand_fp(-12, 0);
        w[k] = (t % 5 == 0) ? x[k] : rand_fp(-12, 0);
        d += rabs(fp2real(x[k]) - fp2real(w[k]));
      end
      if (in_valid) begin
        expq.push_back(d);
        tin.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4 * LAT + 2) @(posedge clk);
    check("all results out", expq.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
