// tb_weight_memory: loads a random map through the write port and checks
// every weight on the parallel outputs and every tag through the
// one-clock tag read port, plus reset-to-zero and ignored writes above
// the implemented words.
// The 8n+k address map follows the design description; the load
// port and reset behaviour checked are this design's own.
module tb_weight_memory;
  import tb_pkg::*;
  import ic_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [11:0] wr_addr = 0;
  logic [31:0] wr_data = 0, tag;
  logic [2:0]  tag_idx = 0;
  feature_vec_t weights [N];
  logic [31:0] model [N * 8];
  int checks = 0, failures = 0;

  weight_memory #(.NUM_NEURONS(N), .ADDR_W(12)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < N; n++) for (int k = 0; k < 7; k++)
      check("reset", weights[n][k] == 32'h0);
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < N * 8; a++) begin
        @(negedge clk);
        model[a] = $urandom;
        wr_en = 1; wr_addr = 12'(a); wr_data = model[a];
      end
      // a write above the map must not alias into it
      @(negedge clk) wr_addr = 12'(N * 8 + 3); wr_data = 32'hDEAD_BEEF;
      @(negedge clk) wr_en = 0;
      for (int n = 0; n < N; n++) for (int k = 0; k < 7; k++)
        check("weight", weights[n][k] == model[n * 8 + k]);
      for (int n = 0; n < N; n++) begin
        @(negedge clk) tag_idx = 3'(n);
        #1 check("tag not early", n == 0 || tag == model[(n - 1) * 8 + 7]);
        @(posedge clk); #1;
        check("tag", tag == model[n * 8 + 7]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
