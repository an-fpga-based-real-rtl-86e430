// tb_eta_normalise: random central moments of both signs against
// eta = mu / mu00^2 computed in double precision (a few ulps of error
// from one multiply and one divide are allowed); one-clock latency.
// The mu/mu00^2 rule checked here is the design description's
// simplification; the random stimuli are this testbench's own.
module tb_eta_normalise;
  import tb_pkg::*;
  import ic_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  central_moments_t mu;
  eta_t eta;
  int checks = 0, failures = 0;

  eta_normalise dut (.*);

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
    real n2;
    logic [31:0] in_v [7], out_v [7];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      mu.mu00 = real2fp(real'($urandom_range(400, 1)));
      for (int i = 0; i < 7; i++) in_v[i] = rand_fp(-4, 16);
      {mu.mu11, mu.mu20, mu.mu02, mu.mu21, mu.mu12, mu.mu30, mu.mu03} =
        {in_v[0], in_v[1], in_v[2], in_v[3], in_v[4], in_v[5], in_v[6]};
      in_valid = 1;
      @(posedge clk); #1;
      check("latency", out_valid);
      @(negedge clk) in_valid = 0;
      n2 = fp2real(mu.mu00) * fp2real(mu.mu00);
      out_v = '{eta.eta11, eta.eta20, eta.eta02, eta.eta21, eta.eta12, eta.eta30, eta.eta03};
      for (int i = 0; i < 7; i++)
        check("eta", close(out_v[i], fp2real(in_v[i]) / n2, 3e-7, 0.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
