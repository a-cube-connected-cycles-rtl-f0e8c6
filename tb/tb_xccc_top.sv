// tb_xccc_top: end-to-end run of XCCC(5,3) at its default parameters.
//
// 1. Performance mode: a word sent on the raw U port of PE(0,0) must arrive
//    on the raw D port of PE(1,1) and one sent on D of PE(6,2) on U of
//    PE(4,1) (cross connections in the X state), and a
//    broadcast from PE(0,1) must reach all 32 PEs in 6 steps. Two pairs of
//    data sets fed back to back into the dual recursive-doubling pipeline
//    (sum, then maximum) must give their results at slot 3 of every cycle
//    K+1 clocks after entry.
// 2. The multiple-fault example: PE(1,1) fails (with its L link), the L link
//    between PE(2,0) and PE(3,0) fails, the F/B link between PE(4,1) and
//    PE(4,2) fails, PE(5,0) fails, and PE(0,4) above the spare fails. The
//    broken links are also cut in the data plane. After every report the
//    working PEs must be connected exactly like CCC(4,3): numbering the
//    working slots of each cycle from the bottom gives logical positions
//    0..3, and a word sent on logical F, B or L must arrive at the logical
//    neighbour the CCC definition names. Reconfiguration after a PE fault at
//    slot f must take K - f clocks.
// 3. A broadcast request and pipeline input in fault-tolerant mode are
//    ignored, and a further
//    failure of PE(6,0) is reported as unsuccessful.
// 4. After a reset: broken L links followed by PE faults in their cycles
//    (below the link, and at its end) must again leave a working CCC(4,3).
// Every mechanism (cross connection use, broadcast, dual pipeline, mode
// switch, PE bypass,
// role shift, sw_on path, X / V / '⊃' settings, step-3 notification, spare
// enabling, failure report) is counted and must occur at least once.
module tb_xccc_top;
  import xccc_pkg::*;
  localparam int W = 16, H = 4, K = 3, NC = 8, NS = 5, CW = 3, QW = 3, PW = 2;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic fault_valid;
  fault_kind_e fault_kind;
  logic [CW-1:0] fault_c;
  logic [QW-1:0] fault_q;
  logic fault_ready, ft_mode, busy, fail;
  logic [7:0] events;
  scp_state_e scp_state [K][NC];
  logic fb_dead [NC][NS], l_dead [NC][NS];
  logic pe_active [NC][NS], l_act [NC][NS], u_act [NC][NS], d_act [NC][NS];
  logic [W-1:0] pe_f_out [NC][NS], pe_b_out [NC][NS], pe_l_out [NC][NS];
  logic [W-1:0] pe_xu_out [NC][NS], pe_xd_out [NC][NS];
  logic [W-1:0] pe_f_in [NC][NS], pe_b_in [NC][NS], pe_l_in [NC][NS];
  logic [W-1:0] pe_xu_in [NC][NS], pe_xd_in [NC][NS];
  logic bc_start;
  logic [CW-1:0] bc_c;
  logic [PW-1:0] bc_p;
  logic [BC_DATA_W-1:0] bc_data;
  logic bc_reached [NC][H];
  logic signed [BC_FIELD_W-1:0] bc_weight [NC][H];
  logic [BC_DATA_W-1:0] bc_rx_data [NC][H];
  logic bc_done, bc_dup;
  logic [7:0] bc_steps;
  logic rd_in_valid, rd_out_valid;
  rd_op_e rd_in_op, rd_out_op;
  logic [W-1:0] rd_in_a [NC], rd_in_b [NC], rd_out_a [NC], rd_out_b [NC];

  xccc_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_ev [8];
  int n_cross = 0, n_bcast = 0, n_mode = 0, n_bypass = 0, n_ccc_ok = 0, n_rd = 0;
  string ev_name [8] = '{"role shift (L active)", "sw_on path", "switch set X",
                         "switch set V", "switch set SUP", "step-3 notification",
                         "spare enabled", "failure reported"};

  always @(posedge clk) if (rst_n) for (int i = 0; i < 8; i++) if (events[i]) n_ev[i]++;

  task automatic chk(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  function automatic logic [W-1:0] tag(int c, int lp, int port);
    return W'((port << 12) | (c << 4) | lp | 16'h0800);
  endfunction

  // check that the working PEs form CCC(H, K)
  task automatic check_ccc(string when);
    int lpos [NC][NS];
    int slot_of [NC][H];
    int cnt;
    int bad;
    bad = 0;
    for (int c = 0; c < NC; c++) begin
      cnt = 0;
      for (int q = 0; q < NS; q++) begin
        lpos[c][q] = -1;
        if (pe_active[c][q]) begin
          if (cnt < H) slot_of[c][cnt] = q;
          lpos[c][q] = cnt;
          cnt++;
        end
      end
      chk($sformatf("%s: cycle %0d has H working PEs", when, c), cnt, H);
      if (cnt != H) bad++;
    end
    if (bad != 0) return;
    for (int c = 0; c < NC; c++)
      for (int q = 0; q < NS; q++) begin
        int lp;
        lp = (lpos[c][q] < 0) ? 0 : lpos[c][q];
        pe_f_out[c][q] = tag(c, lp, 1);
        pe_b_out[c][q] = tag(c, lp, 2);
        pe_l_out[c][q] = tag(c, lp, 3);
      end
    #1;
    for (int c = 0; c < NC; c++)
      for (int lp = 0; lp < H; lp++) begin
        int q, nq, pq;
        q  = slot_of[c][lp];
        nq = slot_of[c][(lp + 1) % H];
        pq = slot_of[c][(lp + H - 1) % H];
        chk($sformatf("%s: B of (%0d,%0d) hears F of its predecessor", when, c, lp),
            int'(pe_b_in[c][q]), int'(tag(c, (lp + H - 1) % H, 1)));
        chk($sformatf("%s: F of (%0d,%0d) hears B of its successor", when, c, lp),
            int'(pe_f_in[c][q]), int'(tag(c, (lp + 1) % H, 2)));
        if (lp < K)
          chk($sformatf("%s: L of (%0d,%0d) hears (%0d,%0d)", when, c, lp, c ^ (1 << lp), lp),
              int'(pe_l_in[c][q]), int'(tag(c ^ (1 << lp), lp, 3)));
        if (nq == q || pq == q) failures++;
      end
    n_ccc_ok++;
  endtask

  task automatic report(fault_kind_e k, int c, int q, output int busy_clks);
    logic was_ft;
    while (!fault_ready) @(negedge clk);
    was_ft = ft_mode;
    fault_valid = 1; fault_kind = k; fault_c = CW'(c); fault_q = QW'(q);
    @(negedge clk);
    fault_valid = 0; fault_kind = FLT_NONE;
    if (!was_ft && ft_mode) n_mode++;
    if (k == FLT_PE && !pe_active[c][q]) n_bypass++;
    busy_clks = 0;
    while (busy) begin
      busy_clks++;
      @(negedge clk);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bc, n;
    for (int i = 0; i < 8; i++) n_ev[i] = 0;
    fault_valid = 0; fault_kind = FLT_NONE; fault_c = '0; fault_q = '0;
    bc_start = 0; bc_c = '0; bc_p = '0; bc_data = '0;
    rd_in_valid = 0; rd_in_op = RD_SUM;
    for (int c = 0; c < NC; c++) begin rd_in_a[c] = '0; rd_in_b[c] = '0; end
    for (int c = 0; c < NC; c++)
      for (int q = 0; q < NS; q++) begin
        fb_dead[c][q] = 0; l_dead[c][q] = 0;
        pe_f_out[c][q] = '0; pe_b_out[c][q] = '0; pe_l_out[c][q] = '0;
        pe_xu_out[c][q] = '0; pe_xd_out[c][q] = '0;
      end
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- performance mode
    chk("starts in performance mode", ft_mode, 0);
    check_ccc("fault-free");
    pe_xu_out[0][0] = 16'h5a5a;
    pe_xd_out[6][2] = 16'h3c3c;
    #1;
    chk("U of (0,0) reaches D of (1,1)", int'(pe_xd_in[1][1]), 16'h5a5a);
    chk("D of (6,2) reaches U of (4,1)", int'(pe_xu_in[4][1]), 16'h3c3c);
    if (pe_xd_in[1][1] == 16'h5a5a) n_cross++;
    pe_xu_out[0][0] = '0; pe_xd_out[6][2] = '0;

    bc_start = 1; bc_c = 0; bc_p = 1; bc_data = 16'hcafe;
    @(negedge clk);
    bc_start = 0;
    n = 0;
    while (!bc_done && n < 50) begin @(negedge clk); n++; end
    chk("broadcast done", bc_done, 1);
    chk("broadcast from PE(0,1) takes 6 steps", bc_steps, 6);
    chk("no duplicate copies", bc_dup, 0);
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < H; p++) begin
        chk($sformatf("broadcast reached (%0d,%0d)", c, p), bc_reached[c][p], 1);
        chk($sformatf("broadcast data at (%0d,%0d)", c, p), int'(bc_rx_data[c][p]), 16'hcafe);
      end
    if (bc_done) n_bcast++;

    // dual pipeline: set A = c+1 (sum 36, max 8), set B = 100-3c (sum 716,
    // max 100); sum and max enter on consecutive clocks
    for (int c = 0; c < NC; c++) begin rd_in_a[c] = W'(c + 1); rd_in_b[c] = W'(100 - 3 * c); end
    rd_in_valid = 1; rd_in_op = RD_SUM;
    @(negedge clk);
    rd_in_op = RD_MAX;
    @(negedge clk);
    rd_in_valid = 0;
    repeat (K - 1) @(negedge clk);
    chk("sum result valid after K+1 clocks", rd_out_valid, 1);
    chk("sum result op", int'(rd_out_op), int'(RD_SUM));
    for (int c = 0; c < NC; c++) begin
      chk($sformatf("set A sum at cycle %0d", c), int'(rd_out_a[c]), 36);
      chk($sformatf("set B sum at cycle %0d", c), int'(rd_out_b[c]), 716);
    end
    if (rd_out_valid && rd_out_a[0] == 36 && rd_out_b[0] == 716) n_rd++;
    @(negedge clk);
    chk("max result valid one clock later", rd_out_valid, 1);
    for (int c = 0; c < NC; c++) begin
      chk($sformatf("set A max at cycle %0d", c), int'(rd_out_a[c]), 8);
      chk($sformatf("set B max at cycle %0d", c), int'(rd_out_b[c]), 100);
    end
    if (rd_out_valid && rd_out_a[0] == 8 && rd_out_b[0] == 100) n_rd++;
    @(negedge clk);
    chk("pipeline empty", rd_out_valid, 0);

    // ---------------- fault-tolerant mode: the multiple-fault example
    l_dead[1][1] = 1;
    report(FLT_PE, 1, 1, bc);
    chk("PE fault at slot 1 takes K-1 clocks", bc, K - 1);
    chk("fault-tolerant mode", ft_mode, 1);
    check_ccc("after PE(1,1)");

    l_dead[2][0] = 1;
    report(FLT_L, 2, 0, bc);
    check_ccc("after L(2,0)-(3,0)");

    fb_dead[4][1] = 1;
    report(FLT_FB, 4, 1, bc);
    check_ccc("after F/B (4,1)-(4,2)");

    report(FLT_PE, 5, 0, bc);
    chk("PE fault at slot 0 takes K clocks", bc, K);
    check_ccc("after PE(5,0)");
    chk("switch between cycles 1 and 5 ends in V", int'(scp_state[2][1]), int'(SCP_V));

    report(FLT_PE, 0, 4, bc);
    check_ccc("after PE(0,4)");
    chk("no failure so far", fail, 0);

    // broadcast is a fault-free feature
    bc_start = 1; bc_c = 3; bc_p = 0; bc_data = 16'h0bad;
    @(negedge clk);
    bc_start = 0;
    repeat (10) @(negedge clk);
    chk("broadcast ignored in fault-tolerant mode", int'(bc_rx_data[3][0]), 16'hcafe);
    rd_in_valid = 1;
    @(negedge clk);
    rd_in_valid = 0;
    n = 0;
    repeat (K + 2) begin @(negedge clk); if (rd_out_valid) n++; end
    chk("pipeline input ignored in fault-tolerant mode", n, 0);

    report(FLT_PE, 6, 0, bc);
    chk("PE(6,0) cannot be tolerated", fail, 1);

    // ---------------- broken L links followed by PE faults in their cycles
    rst_n = 0;
    for (int c = 0; c < NC; c++)
      for (int q = 0; q < NS; q++) begin fb_dead[c][q] = 0; l_dead[c][q] = 0; end
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    l_dead[0][1] = 1;
    report(FLT_L, 0, 1, bc);
    check_ccc("after L(0,1)-(2,1)");
    report(FLT_PE, 0, 0, bc);
    check_ccc("after L(0,1)-(2,1) then PE(0,0)");
    l_dead[6][0] = 1;
    report(FLT_L, 6, 0, bc);
    report(FLT_PE, 6, 0, bc);
    check_ccc("after L(6,0)-(7,0) then PE(6,0)");
    chk("second scenario without failure", fail, 0);

    // ---------------- mechanisms
    for (int i = 0; i < 8; i++) begin
      $display("mechanism %-22s : %0d", ev_name[i], n_ev[i]);
      checks++;
      if (n_ev[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", ev_name[i]); end
    end
    $display("mechanism cross-connection use  : %0d", n_cross);
    $display("mechanism broadcast             : %0d", n_bcast);
    $display("mechanism dual pipeline result  : %0d", n_rd);
    $display("mechanism mode switch           : %0d", n_mode);
    $display("mechanism PE bypass             : %0d", n_bypass);
    $display("CCC(4,3) connectivity verified  : %0d times", n_ccc_ok);
    checks += 5;
    if (n_rd == 0)     begin failures++; $display("FAIL no dual pipeline result"); end
    if (n_cross == 0)  begin failures++; $display("FAIL no cross-connection use"); end
    if (n_bcast == 0)  begin failures++; $display("FAIL no broadcast"); end
    if (n_mode == 0)   begin failures++; $display("FAIL no mode switch"); end
    if (n_bypass == 0) begin failures++; $display("FAIL no bypass"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
