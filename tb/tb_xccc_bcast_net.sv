// tb_xccc_bcast_net: broadcasts from every PE of the fault-free network for
// XCCC(5,3) (the default), XCCC(7,3) and XCCC(6,4), checking delivery, weights
// and step bounds (see bcast_net_harness). For XCCC(5,3) it also checks the
// worked example: a broadcast from PE(0,1) takes 6 steps.
module tb_xccc_bcast_net;
  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  int c0, f0, s0, mn0, mx0; logic d0;
  int c1, f1, s1, mn1, mx1; logic d1;
  int c2, f2, s2, mn2, mx2; logic d2;

  bcast_net_harness #(.H(4), .K(3)) h0 (.clk, .rst_n, .go, .checks(c0), .failures(f0),
    .steps_from_0_1(s0), .min_steps(mn0), .max_steps(mx0), .finished(d0));
  bcast_net_harness #(.H(6), .K(3)) h1 (.clk, .rst_n, .go, .checks(c1), .failures(f1),
    .steps_from_0_1(s1), .min_steps(mn1), .max_steps(mx1), .finished(d1));
  bcast_net_harness #(.H(5), .K(4)) h2 (.clk, .rst_n, .go, .checks(c2), .failures(f2),
    .steps_from_0_1(s2), .min_steps(mn2), .max_steps(mx2), .finished(d2));

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    go = 1;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    if (s0 != 6) begin
      failures++;
      $display("FAIL broadcast from PE(0,1) in XCCC(5,3) took %0d steps, expected 6", s0);
    end
    $display("steps XCCC(5,3) %0d..%0d, XCCC(7,3) %0d..%0d, XCCC(6,4) %0d..%0d",
             mn0, mx0, mn1, mx1, mn2, mx2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
