// tb_xccc_dual_rd: streams pairs of data sets into the dual recursive-doubling
// pipeline of an XCCC with 8 cycles and checks every result against a plain
// loop over the inputs. A few hand-worked sets come first (sum of 1..8 = 36,
// minimum and maximum of a known set), then 300 clocks of random sets with
// random gaps and a random operation per set. Checked per set: both results
// in every cycle, the op that came out with them, and that they appear exactly
// K+1 clocks after entry; also that nothing comes out that was not put in.
module tb_xccc_dual_rd;
  import xccc_pkg::*;

  localparam int unsigned W  = 16;
  localparam int unsigned K  = 3;
  localparam int unsigned NC = 1 << K;
  localparam int unsigned LAT = K + 1;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic         in_valid, out_valid;
  rd_op_e       in_op, out_op;
  logic [W-1:0] in_a [NC], in_b [NC], out_a [NC], out_b [NC];
  int checks = 0, failures = 0;

  xccc_dual_rd #(.W(W), .K(K)) dut (.*);

  typedef struct {
    int          t;
    rd_op_e      op;
    logic [W-1:0] ra, rb;
  } exp_t;
  exp_t exp_q[$];
  int cyc = 0;

  function automatic logic [W-1:0] reduce(rd_op_e op, logic [W-1:0] v [NC]);
    logic [W-1:0] r = v[0];
    for (int i = 1; i < NC; i++)
      case (op)
        RD_SUM: r = r + v[i];
        RD_MIN: if (v[i] < r) r = v[i];
        RD_MAX: if (v[i] > r) r = v[i];
        default: ;
      endcase
    return r;
  endfunction

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (clock %0d)", what, cyc);
    end
  endtask

  // apply one set on the next clock edge and record what must come out
  task automatic put(bit v, rd_op_e op, logic [W-1:0] a [NC], logic [W-1:0] b [NC]);
    in_valid = v; in_op = op; in_a = a; in_b = b;
    if (v) exp_q.push_back('{t: cyc + LAT + 1, op: op, ra: reduce(op, a), rb: reduce(op, b)});
    @(posedge clk); #1;
  endtask

  // compare outputs after every edge
  always @(posedge clk) begin
    #2;
    cyc++;
    if (rst_n) begin
      if (exp_q.size() > 0 && exp_q[0].t == cyc) begin
        exp_t e;
        e = exp_q.pop_front();
        chk("result valid", out_valid);
        chk("op travels with the data", out_op == e.op);
        for (int c = 0; c < NC; c++) begin
          chk($sformatf("set A result at cycle %0d", c), out_a[c] == e.ra);
          chk($sformatf("set B result at cycle %0d", c), out_b[c] == e.rb);
        end
      end else begin
        chk("no result without an input", !out_valid);
      end
    end
  end

  logic [W-1:0] a [NC], b [NC];

  initial begin
    in_valid = 0; in_op = RD_SUM;
    for (int c = 0; c < NC; c++) begin in_a[c] = '0; in_b[c] = '0; end
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;

    // hand-worked: sum of 1..8 = 36; set B holds 10*c, sum = 280
    for (int c = 0; c < NC; c++) begin a[c] = W'(c + 1); b[c] = W'(10 * c); end
    put(1, RD_SUM, a, b);
    // min / max of 7, 3, 9, 5, 12, 4, 8, 6 -> 3 and 12, back to back
    a = '{7, 3, 9, 5, 12, 4, 8, 6};
    b = '{70, 30, 90, 50, 120, 40, 80, 60};
    put(1, RD_MIN, a, b);
    put(1, RD_MAX, a, b);
    put(0, RD_SUM, a, b);
    repeat (LAT + 1) put(0, RD_SUM, a, b);
    if (exp_q.size() != 0) chk("hand-worked sets drained", 0);
    // the hand values themselves
    chk("hand sum 36", reduce(RD_SUM, '{1, 2, 3, 4, 5, 6, 7, 8}) == 36);

    // random stream
    for (int i = 0; i < 300; i++) begin
      for (int c = 0; c < NC; c++) begin a[c] = W'($urandom); b[c] = W'($urandom); end
      put(($urandom % 4) != 0, rd_op_e'($urandom % 3), a, b);
    end
    repeat (LAT + 2) put(0, RD_SUM, a, b);
    chk("all results seen", exp_q.size() == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
