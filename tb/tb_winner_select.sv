// tb_winner_select: random non-negative distances, including ties and a
// minimum in every position, against a linear argmin that keeps the first
// of equal values; checks the NUM_NEURONS clock search time and that a
// new request during a search is ignored.
// The strict-less-than search with ties to the lower index follows
// the design description; the stimuli are this testbench's own.
module tb_winner_select;
  import tb_pkg::*;
  import ic_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0, in_valid = 0, busy, out_valid;
  logic [31:0] distances [N];
  logic [2:0]  index;
  logic [31:0] min_dist;
  int checks = 0, failures = 0;

  winner_select #(.NUM_NEURONS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        distances[n] = rand_fp(-6, 6);
        distances[n][31] = 1'b0;
      end
      if (t % 4 == 1) distances[$urandom_range(N - 1)] = 32'h0;          // exact zero
      if (t % 4 == 2) distances[$urandom_range(N - 1, 1)] = distances[0]; // tie
      if (t < N) distances[t] = 32'h0000_0001 + 32'h0080_0000;            // min at t
      best = 0;
      for (int n = 1; n < N; n++)
        if (fp2real(distances[n]) < fp2real(distances[best])) best = n;
      in_valid = 1;
      @(posedge clk);
      @(negedge clk);
      in_valid = (t % 3 == 0);     // ignored: search running
      cyc = 1;
      while (!out_valid) begin
        @(posedge clk); #1; cyc++;
        if (cyc == 2) in_valid = 0;
      end
      check("search time", cyc == N);
      check("index", int'(index) == best);
      check("min", min_dist == distances[best]);
      @(negedge clk) in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
