// tb_bcast_node: applies each case of the broadcast forwarding rule to a PE at
// position 1 of a 4-PE cycle (and to one without a U link) and compares the
// messages it sends one clock later with the values the rule gives, worked
// out by hand: originate, arrival over D, arrival over F and over B with and
// without a remaining count, the U decision against the weight, and the
// duplicate flag.
module tb_bcast_node;
  import xccc_pkg::*;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic clear, start;
  logic [BC_DATA_W-1:0] start_data;
  bc_msg_t rx_f, rx_b, rx_d, tx_f, tx_b, tx_u, n_tx_f, n_tx_b, n_tx_u;
  logic reached, dup, n_reached, n_dup;
  logic signed [BC_FIELD_W-1:0] weight, n_weight;
  logic [BC_DATA_W-1:0] data, n_data;
  int checks = 0, failures = 0;

  bcast_node #(.H(4), .P(1), .HAS_U(1'b1)) dut (.*);
  bcast_node #(.H(4), .P(3), .HAS_U(1'b0)) dut_nou (
    .clk, .rst_n, .clear, .start, .start_data, .rx_f, .rx_b, .rx_d,
    .tx_f(n_tx_f), .tx_b(n_tx_b), .tx_u(n_tx_u), .reached(n_reached),
    .weight(n_weight), .data(n_data), .dup(n_dup));

  function automatic bc_msg_t msg(int w, int n, int d);
    bc_msg_t m;
    m.valid = 1'b1; m.weight = BC_FIELD_W'(w); m.count = BC_FIELD_W'(n);
    m.data = BC_DATA_W'(d);
    return m;
  endfunction

  task automatic chk_msg(string what, bc_msg_t got, bit valid, int w, int n);
    checks++;
    if (got.valid !== valid || (valid && (got.weight !== BC_FIELD_W'(w) || got.count !== BC_FIELD_W'(n)))) begin
      failures++;
      $display("FAIL %s: got v=%0b w=%0d n=%0d expected v=%0b w=%0d n=%0d",
               what, got.valid, got.weight, got.count, valid, w, n);
    end
  endtask

  task automatic chk(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  task automatic idle();
    clear = 0; start = 0; rx_f = '0; rx_b = '0; rx_d = '0;
  endtask

  // apply for one clock, then look at the registered outputs
  task automatic apply();
    @(negedge clk);
    idle();
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); start_data = 16'hbeef;
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    chk("nothing reached after reset", reached, 0);

    // originate: weight -1, F count 2, B count 1, U
    clear = 1; start = 1; apply();
    chk_msg("orig F", tx_f, 1, -1, 2);
    chk_msg("orig B", tx_b, 1, -1, 1);
    chk_msg("orig U", tx_u, 1, -1, 0);
    chk("orig reached", reached, 1); chk("orig weight", weight, -1);
    chk("orig data", data, 16'hbeef);
    apply();
    chk_msg("quiet F", tx_f, 0, 0, 0);

    // arrival over D: weight = position
    clear = 1; apply();
    chk("cleared", reached, 0);
    rx_d = msg(0, 0, 16'h1234); apply();
    chk_msg("D F", tx_f, 1, 1, 2);
    chk_msg("D B", tx_b, 1, 1, 1);
    chk_msg("D U", tx_u, 1, 1, 0);
    chk("D weight", weight, 1); chk("D data", data, 16'h1234);
    chk("no dup", dup, 0);

    // arrival over F (from the successor), weight 0 < P, count 2:
    // U sent, passed on out of B with count 1
    clear = 1; apply();
    rx_f = msg(0, 2, 5); apply();
    chk_msg("F->U", tx_u, 1, 0, 0);
    chk_msg("F->B", tx_b, 1, 0, 1);
    chk_msg("F no F", tx_f, 0, 0, 0);
    chk("F weight kept", weight, 0);

    // arrival over B, weight 1 = P, count 1: nothing sent
    clear = 1; apply();
    rx_b = msg(1, 1, 5); apply();
    chk_msg("B no U", tx_u, 0, 0, 0);
    chk_msg("B no F", tx_f, 0, 0, 0);
    chk("B reached", reached, 1);

    // arrival over B, weight -1, count 2: U and pass on out of F
    clear = 1; apply();
    rx_b = msg(-1, 2, 5); apply();
    chk_msg("B->U", tx_u, 1, -1, 0);
    chk_msg("B->F", tx_f, 1, -1, 1);

    // second copy: duplicate flag
    rx_f = msg(-1, 1, 5); apply();
    chk("duplicate flagged", dup, 1);

    // PE without U: from D, no U message
    clear = 1; apply();
    rx_d = msg(2, 0, 7); apply();
    chk_msg("no-U node U", n_tx_u, 0, 0, 0);
    chk("no-U node weight", n_weight, 3);
    chk_msg("no-U node F", n_tx_f, 1, 3, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
