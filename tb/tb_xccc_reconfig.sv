// tb_xccc_reconfig: runs the reconfiguration controller of XCCC(5,3) through
// the multiple-fault example of the architecture: PE(1,1) fails, the L link
// between PE(2,0) and PE(3,0) fails, the F/B link between PE(4,1) and PE(4,2)
// fails, and PE(5,0) fails; then PE(0,4) above the spare fails. The expected
// switch settings and link activations are written out by hand from that
// example (switch between cycles 1 and 5 ends in V, and so on). It then
// checks that a following failure of PE(6,0) or PE(6,1) is reported as
// unsuccessful (PE(4,1)'s U is taken), that an F/B link fault after a PE
// fault below it in the partner cycle fails, that a second PE fault in one
// cycle fails, that a link fault without a free SCP fails, that a broken L
// link followed by a PE fault in its cycle is tolerated, and that
// reconfiguration after a PE fault at slot f keeps the controller busy for
// K - f clocks.
module tb_xccc_reconfig;
  import xccc_pkg::*;
  localparam int H = 4, K = 3, NC = 8, NS = 5, CW = 3, QW = 3;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic fault_valid;
  fault_kind_e fault_kind;
  logic [CW-1:0] fault_c;
  logic [QW-1:0] fault_q;
  logic fault_ready, ft_mode, busy, fail;
  logic byp [NC][NS], f_via_u [NC][NS], b_via_d [NC][NS];
  lat_route_e lat_route [NC][NS];
  logic l_act [NC][NS], u_act [NC][NS], d_act [NC][NS];
  scp_state_e scp_state [K][NC];
  logic ev_shift, ev_swon, ev_set_x, ev_set_v, ev_set_sup, ev_inform, ev_spare_on, ev_fail;

  int checks = 0, failures = 0;

  xccc_reconfig #(.H(H), .K(K)) dut (.*);

  task automatic chk(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  // report one fault, return the number of busy clocks that followed
  task automatic report(fault_kind_e k, int c, int q, output int busy_clks);
    while (!fault_ready) @(negedge clk);
    fault_valid = 1; fault_kind = k; fault_c = CW'(c); fault_q = QW'(q);
    @(negedge clk);
    fault_valid = 0; fault_kind = FLT_NONE;
    busy_clks = 0;
    while (busy) begin
      busy_clks++;
      @(negedge clk);
    end
  endtask

  task automatic do_reset();
    fault_valid = 0; fault_kind = FLT_NONE; fault_c = '0; fault_q = '0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  function automatic int scp(int p, int c);
    return int'(scp_state[p][c]);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bc;
    do_reset();
    // performance mode: every SCP reads X
    chk("perf mode", ft_mode, 0);
    for (int p = 0; p < K; p++)
      for (int c = 0; c < NC; c++) chk($sformatf("perf scp %0d/%0d", p, c), scp(p, c), int'(SCP_X));

    report(FLT_PE, 1, 1, bc);
    chk("ft mode after first fault", ft_mode, 1);
    chk("busy clocks for fault at slot 1", bc, K - 1);
    chk("scp d1 c1 X", scp(1, 1), int'(SCP_X));
    chk("scp d2 c1 X", scp(2, 1), int'(SCP_X));
    chk("scp d0 c0 off", scp(0, 0), int'(SCP_OFF));
    chk("(1,1) bypassed", byp[1][1], 1);
    chk("(1,2) lateral via D", int'(lat_route[1][2]), int'(VIA_D));
    chk("(3,1) lateral via U", int'(lat_route[3][1]), int'(VIA_U));
    chk("spare (1,3) on", byp[1][3], 0);
    chk("(5,2) via U", int'(lat_route[5][2]), int'(VIA_U));
    chk("no fail yet", fail, 0);

    report(FLT_L, 2, 0, bc);
    chk("L fault busy", bc, 0);
    chk("scp d0 c2 V", scp(0, 2), int'(SCP_V));
    chk("(2,0) via U", int'(lat_route[2][0]), int'(VIA_U));
    chk("(3,0) via U", int'(lat_route[3][0]), int'(VIA_U));

    report(FLT_FB, 4, 1, bc);
    chk("scp d1 c4 SUP", scp(1, 4), int'(SCP_SUP));
    chk("(4,1) F via U", f_via_u[4][1], 1);
    chk("(4,2) B via D", b_via_d[4][2], 1);
    chk("(4,1) keeps L", int'(lat_route[4][1]), int'(VIA_L));

    report(FLT_PE, 5, 0, bc);
    chk("busy clocks for fault at slot 0", bc, K);
    chk("scp d0 c4 X", scp(0, 4), int'(SCP_X));
    chk("scp d1 c5 X", scp(1, 5), int'(SCP_X));
    chk("scp d2 c1 V", scp(2, 1), int'(SCP_V));
    chk("(4,0) via U", int'(lat_route[4][0]), int'(VIA_U));
    chk("(7,1) via U", int'(lat_route[7][1]), int'(VIA_U));
    chk("(5,1) via D", int'(lat_route[5][1]), int'(VIA_D));
    chk("(5,2) via D", int'(lat_route[5][2]), int'(VIA_D));
    chk("(5,2) U released", u_act[5][2], 0);
    chk("spare (5,3) on", byp[5][3], 0);
    chk("no fail after tolerable pattern", fail, 0);

    report(FLT_PE, 0, 4, bc);
    chk("fault above spare: no walk", bc, 0);
    chk("spare (0,3) on", byp[0][3], 0);
    chk("(0,4) off", byp[0][4], 1);
    chk("still no fail", fail, 0);
    // untouched SCPs remain off
    chk("scp d2 c2 off", scp(2, 2), int'(SCP_OFF));
    chk("scp d1 c0 off", scp(1, 0), int'(SCP_OFF));

    report(FLT_PE, 6, 0, bc);
    chk("PE(6,0) after the pattern fails", fail, 1);

    // the same pattern, then PE(6,1) instead: also unsuccessful
    do_reset();
    report(FLT_PE, 1, 1, bc);
    report(FLT_L, 2, 0, bc);
    report(FLT_FB, 4, 1, bc);
    report(FLT_PE, 5, 0, bc);
    chk("pattern replayed without failure", fail, 0);
    report(FLT_PE, 6, 1, bc);
    chk("PE(6,1) after the pattern fails", fail, 1);

    // an F/B link at dimension p cannot be replaced once a PE at or below
    // p in either cycle has failed: the shift already took the SCP
    do_reset();
    report(FLT_PE, 2, 0, bc);
    report(FLT_FB, 0, 1, bc);
    chk("F/B after a partner PE fault below it fails", fail, 1);

    // two PE faults in one cycle
    do_reset();
    report(FLT_PE, 3, 2, bc);
    chk("busy clocks for fault at slot 2", bc, 1);
    chk("ok", fail, 0);
    report(FLT_PE, 3, 0, bc);
    chk("second PE fault in a cycle fails", fail, 1);

    // link faults competing for one SCP, and a link without SCP
    do_reset();
    report(FLT_FB, 2, 1, bc);
    chk("first FB ok", fail, 0);
    report(FLT_L, 0, 1, bc);
    chk("L fault sharing the SCP fails", fail, 1);
    do_reset();
    report(FLT_FB, 0, 3, bc);
    chk("FB link above the dimensions has no SCP", fail, 1);

    // PE fault after a PE fault in the partner cycle: the failed PE had
    // been told to use U, its successor must pick V
    do_reset();
    report(FLT_PE, 1, 1, bc);
    report(FLT_PE, 3, 1, bc);
    chk("(3,2) joins (1,2) with V", scp(1, 1), int'(SCP_V));
    chk("partner failures tolerated", fail, 0);

    // broken L link first, then a PE fault below it in one of its cycles:
    // the new role holder reaches the partner's U over X
    do_reset();
    report(FLT_L, 0, 1, bc);
    chk("L(0,1)-(2,1) replaced with V", scp(1, 0), int'(SCP_V));
    report(FLT_PE, 0, 0, bc);
    chk("(0,2) reaches U of (2,1) with X", scp(1, 0), int'(SCP_X));
    chk("(0,2) lateral via D", int'(lat_route[0][2]), int'(VIA_D));
    chk("(2,1) still via U", int'(lat_route[2][1]), int'(VIA_U));
    chk("(0,1) lateral via D", int'(lat_route[0][1]), int'(VIA_D));
    chk("L fault then PE fault tolerated", fail, 0);
    // broken L link, then the PE at one of its ends fails
    do_reset();
    report(FLT_L, 2, 0, bc);
    report(FLT_PE, 2, 0, bc);
    chk("(2,1) reaches U of (3,0) with X", scp(0, 2), int'(SCP_X));
    chk("(3,0) via U", int'(lat_route[3][0]), int'(VIA_U));
    chk("L fault then end PE fault tolerated", fail, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
