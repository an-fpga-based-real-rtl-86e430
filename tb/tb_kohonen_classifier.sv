// tb_kohonen_classifier: eight neurons with random weight vectors (one of
// them placed near the input so that every neuron wins some of the time)
// and a behavioural tag memory with one-clock reads. The class must be
// the tag of the neuron at the smallest Manhattan distance worked out in
// double precision, and it must arrive 4*FP_LAT + NUM_NEURONS clocks after
// the edge that samples in_valid: 32 clocks, 320 ns at a 10 ns clock,
// inside the 310-360 ns response time the design targets.
// The eight neurons, the L1 distance and the 310-360 ns response
// (32 clocks = 320 ns at 10 ns) follow the design description; the maps
// and inputs are this testbench's own.
module tb_kohonen_classifier;
  import tb_pkg::*;
  import ic_pkg::*;
  localparam int N = 8, LAT = 6;

  logic clk = 0, rst_n = 0, in_valid = 0, busy, class_valid;
  feature_vec_t hu;
  feature_vec_t weights [N];
  logic [2:0]  tag_idx, winner;
  logic [31:0] tag = 0, class_tag, min_dist;
  logic [31:0] tags [N];
  int checks = 0, failures = 0;
  int wins [N];

  kohonen_classifier #(.NUM_NEURONS(N), .FP_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) tag <= tags[tag_idx];

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real d [N];
    int best, second, cyc, near;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) tags[n] = $urandom;
      for (int k = 0; k < 7; k++) hu[k] = rand_fp(-14, -1);
      near = t % N;
      for (int n = 0; n < N; n++)
        for (int k = 0; k < 7; k++)
          weights[n][k] = (n == near) ? real2fp(fp2real(hu[k]) * (1.0 + 0.01 * real'($urandom_range(10)) / 10.0))
                                      : rand_fp(-14, -1);
      best = 0;
      for (int n = 0; n < N; n++) begin
        d[n] = 0.0;
        for (int k = 0; k < 7; k++) d[n] += rabs(fp2real(hu[k]) - fp2real(weights[n][k]));
        if (d[n] < d[best]) best = n;
      end
      second = (best == 0) ? 1 : 0;
      for (int n = 0; n < N; n++) if (n != best && d[n] < d[second]) second = n;
      in_valid = 1;
      @(posedge clk);
      @(negedge clk) in_valid = 0;
      cyc = 0;
      while (!class_valid) begin
        @(posedge clk); #1; cyc++;
      end
      check("latency", cyc == 4 * LAT + N);
      if (d[second] - d[best] > 1e-5 * d[best]) begin
        check("winner", int'(winner) == best);
        check("class tag", class_tag == tags[best]);
        check("min distance", close(min_dist, d[best], 1e-5, 0.0));
        wins[best]++;
      end
      @(posedge clk); #1;
      check("idle", !busy && !class_valid);
    end
    for (int n = 0; n < N; n++) check("every neuron won", wins[n] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
