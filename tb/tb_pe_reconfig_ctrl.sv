// tb_pe_reconfig_ctrl: exercises the per-PE reconfiguration procedure on a
// dimensional PE and on a spare. Expected link states, switch settings and
// failure reports are written out from the procedure's three steps for each
// scenario: role shift with L active, shift with L already replaced by U
// (sw_on path, V setting), shift after a broken L link (X setting), step-3
// notification, F/B and L link faults,
// repeated requests that must fail, spare enabling and the one-clock token
// delay.
module tb_pe_reconfig_ctrl;
  import xccc_pkg::*;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  // stimulus shared by both instances
  logic pe_fault, activate, token_in, pred_sw_on, inform_in, fb_u_req, fb_d_req, l_u_req;

  // dimensional PE
  logic       tok_o, d_set, inf_o, fail, sw_on, byp, l_act, u_act, d_act, fvu, bvd, e_sh, e_sw;
  scp_state_e d_state;
  lat_route_e lat;
  // spare
  logic       s_tok_o, s_d_set, s_inf_o, s_fail, s_sw_on, s_byp, s_l_act, s_u_act, s_d_act;
  logic       s_fvu, s_bvd, s_e_sh, s_e_sw;
  scp_state_e s_d_state;
  lat_route_e s_lat;
  logic       s_token_in, s_pe_fault, s_activate;

  int checks = 0, failures = 0;

  pe_reconfig_ctrl #(.IS_DIM(1'b1), .IS_SPARE(1'b0), .HAS_D(1'b1)) dut (
    .clk, .rst_n, .pe_fault, .activate, .token_in, .pred_sw_on, .token_out(tok_o),
    .inform_in, .fb_u_req, .fb_d_req, .l_u_req, .d_set, .d_state, .inform_out(inf_o),
    .fail, .sw_on, .byp, .l_act, .u_act, .d_act, .f_via_u(fvu), .b_via_d(bvd),
    .lat_route(lat), .ev_shift(e_sh), .ev_swon(e_sw));

  pe_reconfig_ctrl #(.IS_DIM(1'b0), .IS_SPARE(1'b1), .HAS_D(1'b1)) spare (
    .clk, .rst_n, .pe_fault(s_pe_fault), .activate(s_activate), .token_in(s_token_in),
    .pred_sw_on, .token_out(s_tok_o),
    .inform_in(1'b0), .fb_u_req(1'b0), .fb_d_req(1'b0), .l_u_req(1'b0),
    .d_set(s_d_set), .d_state(s_d_state), .inform_out(s_inf_o),
    .fail(s_fail), .sw_on(s_sw_on), .byp(s_byp), .l_act(s_l_act), .u_act(s_u_act),
    .d_act(s_d_act), .f_via_u(s_fvu), .b_via_d(s_bvd), .lat_route(s_lat),
    .ev_shift(s_e_sh), .ev_swon(s_e_sw));

  task automatic chk(string what, logic got, logic exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp_v);
    end
  endtask

  task automatic idle();
    {pe_fault, activate, token_in, pred_sw_on, inform_in, fb_u_req, fb_d_req, l_u_req} = '0;
    {s_token_in, s_pe_fault, s_activate} = '0;
  endtask

  task automatic do_reset();
    idle();
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();
    // reset state
    chk("reset l_act", l_act, 1); chk("reset byp", byp, 0);
    chk("reset spare byp", s_byp, 1); chk("reset spare l_act", s_l_act, 0);
    chk("reset lat=L", lat == VIA_L, 1);

    // --- shift with L active, predecessor sw_on false: X, inform
    token_in = 1; pred_sw_on = 0; #1;
    chk("d_set", d_set, 1); chk("d_state X", d_state == SCP_X, 1);
    chk("inform", inf_o, 1); chk("ev_shift", e_sh, 1); chk("no fail", fail, 0);
    @(negedge clk); idle(); #1;
    chk("token_out one clock later", tok_o, 1);
    chk("l dropped", l_act, 0); chk("d active", d_act, 1);
    chk("lat via D", lat == VIA_D, 1); chk("sw_on still false", sw_on, 0);
    @(negedge clk);
    chk("token_out single pulse", tok_o, 0);
    // --- a second token finds D active: failure
    token_in = 1; #1;
    chk("step2 fails on active D", fail, 1); chk("no second d_set", d_set, 0);
    @(negedge clk); idle();

    // --- inform, then a shift through the sw_on path
    do_reset();
    inform_in = 1; #1; chk("inform ok", fail, 0);
    @(negedge clk); idle(); #1;
    chk("U active", u_act, 1); chk("L off", l_act, 0); chk("lat via U", lat == VIA_U, 1);
    chk("sw_on set by inform", sw_on, 1);
    inform_in = 1; #1; chk("inform onto U already carrying L is fine", fail, 0);
    @(negedge clk); idle();
    token_in = 1; pred_sw_on = 1; #1;
    chk("ev_swon", e_sw, 1); chk("ev_shift not", e_sh, 0);
    chk("d_state V", d_state == SCP_V, 1); chk("no inform on V", inf_o, 0);
    @(negedge clk); idle(); #1;
    chk("U released", u_act, 0); chk("D active", d_act, 1); chk("sw_on", sw_on, 1);
    chk("lat via D (2)", lat == VIA_D, 1);

    // --- F/B link faults
    do_reset();
    fb_u_req = 1; #1; chk("fb_u ok", fail, 0);
    @(negedge clk); idle(); #1;
    chk("f via u", fvu, 1); chk("u active (F)", u_act, 1); chk("L kept", l_act, 1);
    fb_d_req = 1; #1; chk("fb_d ok", fail, 0);
    @(negedge clk); idle(); #1;
    chk("b via d", bvd, 1);
    l_u_req = 1; #1; chk("L fault with U busy fails", fail, 1);
    @(negedge clk); idle();
    inform_in = 1; #1; chk("inform onto U carrying F fails", fail, 1);
    @(negedge clk); idle();
    token_in = 1; #1; chk("shift with D busy fails", fail, 1);
    @(negedge clk); idle();

    // --- L link fault
    do_reset();
    l_u_req = 1; #1; chk("l_u ok", fail, 0);
    @(negedge clk); idle(); #1;
    chk("L replaced by U", lat == VIA_U, 1); chk("L off (2)", l_act, 0);
    chk("sw_on untouched by L fault", sw_on, 0);
    // a lower PE fault now shifts this PE: U released, sw_on stays false
    token_in = 1; pred_sw_on = 0; #1;
    chk("ev_swon after L fault", e_sw, 1); chk("X towards partner U", d_state == SCP_X, 1);
    @(negedge clk); idle(); #1;
    chk("sw_on false after L-fault shift", sw_on, 0); chk("U released (2)", u_act, 0);

    // --- spare: steps 2 and 3, no step 1, no token onward
    do_reset();
    s_token_in = 1; pred_sw_on = 0; #1;
    chk("spare d_set", s_d_set, 1); chk("spare X", s_d_state == SCP_X, 1);
    chk("spare inform", s_inf_o, 1); chk("spare no step1", s_e_sh | s_e_sw, 0);
    @(negedge clk); idle(); #1;
    chk("spare enabled", s_byp, 0); chk("spare D", s_d_act, 1);
    chk("spare passes no token", s_tok_o, 0);
    s_pe_fault = 1; @(negedge clk); idle(); #1;
    chk("faulty spare bypassed", s_byp, 1);
    s_activate = 1; @(negedge clk); idle(); #1;
    chk("activate enables", s_byp, 0);
    pe_fault = 1; @(negedge clk); idle(); #1;
    chk("faulty PE bypassed", byp, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
