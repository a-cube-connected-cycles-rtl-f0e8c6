// bcast_net_harness: broadcasts from every PE of one xccc_bcast_net instance
// and checks the outcome against facts derived from the network definition:
// every PE receives exactly one copy with the right payload, a PE of cycle c
// records weight -1 in the originating cycle c0 and otherwise 1 + (index of
// the highest bit in which c and c0 differ), and the broadcast takes between
// K + ceil((H-1)/2) and K + 2*ceil((H-1)/2) clocks. It reports its counts and
// raises finished when done; it also returns the step count seen for the
// broadcast from PE(0,1).
module bcast_net_harness #(
  parameter int H = 4,
  parameter int K = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output int   checks,
  output int   failures,
  output int   steps_from_0_1,
  output int   min_steps,
  output int   max_steps,
  output logic finished
);
  import xccc_pkg::*;
  localparam int NC = 1 << K;
  localparam int CW = K;
  localparam int PW = (H > 1) ? $clog2(H) : 1;

  logic start;
  logic [CW-1:0] start_c;
  logic [PW-1:0] start_p;
  logic [BC_DATA_W-1:0] start_data;
  logic reached [NC][H];
  logic signed [BC_FIELD_W-1:0] weight [NC][H];
  logic [BC_DATA_W-1:0] data [NC][H];
  logic done, dup_err;
  logic [7:0] steps;

  xccc_bcast_net #(.H(H), .K(K)) dut (.*);

  task automatic chk(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL H=%0d K=%0d %s: got %0d expected %0d", H, K, what, got, exp_v);
    end
  endtask

  function automatic int msb(int x);
    int r = -1;
    for (int i = 0; i < 32; i++) if (x[i]) r = i;
    return r;
  endfunction

  initial begin
    int half, lo, hi, n;
    checks = 0; failures = 0; finished = 0; start = 0; steps_from_0_1 = -1;
    start_c = '0; start_p = '0; start_data = '0;
    min_steps = 1000; max_steps = 0;
    half = H / 2;                 // ceil((H-1)/2)
    lo = K + half; hi = K + 2 * half;
    wait (go);
    for (int c0 = 0; c0 < NC; c0++) begin
      for (int p0 = 0; p0 < H; p0++) begin
        @(negedge clk);
        start = 1; start_c = CW'(c0); start_p = PW'(p0);
        start_data = BC_DATA_W'($urandom);
        @(negedge clk);
        start = 0;
        n = 0;
        while (!done && n < 100) begin
          @(negedge clk);
          n++;
        end
        chk($sformatf("done from (%0d,%0d)", c0, p0), done, 1);
        chk($sformatf("no duplicate from (%0d,%0d)", c0, p0), dup_err, 0);
        checks++;
        if (int'(steps) < lo || int'(steps) > hi) begin
          failures++;
          $display("FAIL H=%0d K=%0d steps from (%0d,%0d) = %0d outside [%0d,%0d]",
                   H, K, c0, p0, steps, lo, hi);
        end
        if (int'(steps) < min_steps) min_steps = int'(steps);
        if (int'(steps) > max_steps) max_steps = int'(steps);
        if (c0 == 0 && p0 == 1) steps_from_0_1 = int'(steps);
        for (int c = 0; c < NC; c++)
          for (int p = 0; p < H; p++) begin
            chk($sformatf("reached (%0d,%0d) from (%0d,%0d)", c, p, c0, p0), reached[c][p], 1);
            chk($sformatf("weight (%0d,%0d) from (%0d,%0d)", c, p, c0, p0), int'(weight[c][p]),
                (c == c0) ? -1 : msb(c ^ c0) + 1);
            chk($sformatf("data (%0d,%0d)", c, p), int'(data[c][p]), int'(start_data));
          end
      end
    end
    finished = 1;
  end
endmodule
