// pe_reconfig_ctrl: the reconfiguration state and procedure of one PE.
//
// Every PE keeps which of its links are active (L, and U / D with the reason
// each is used), whether it is bypassed, and the Boolean sw_on that its cycle
// successor reads. When a PE below it in the same cycle fails, a token walks up
// the cycle one PE per clock, and the PE holding it carries out the procedure:
//   Step 1 (dimensional PEs only): if L is active, deactivate it; otherwise
//          deactivate U (it was standing in for L).
//   Step 2: if D is already active the reconfiguration fails; otherwise
//          activate D and set the switch below it to X when the predecessor's
//          sw_on is false, to V when it is true (d_set / d_state, same clock).
//   Step 3: tell the PE at the other end of the new D link to activate U and
//          deactivate L (inform_out, same clock; X state only, since in the V
//          state the far end is a D port that is already active).
// The spare performs steps 2 and 3 only, and becomes active.
// A PE told by step 3 (inform_in) activates U and drops L, and sets sw_on:
// its lateral partner role has moved up one slot in the other cycle. It fails
// if its U is already standing in for a broken F link; if U already stands in
// for its broken L link, the new connection serves the same purpose and the
// notice succeeds. sw_on is set here rather than in step 1 (where the
// procedure as published writes it) so that it is true exactly when the
// partner cycle has shifted: after a broken L link replaced over U, the next
// PE must choose X (towards the partner's U), not V. This also lets the
// successor of a failed PE that had been told choose V correctly.
// A failed F/B link makes the lower PE use U for F (fb_u_req) and the upper
// PE use D for B (fb_d_req); a failed L link makes both end PEs use U for L
// (l_u_req). Each request fails if the port it needs is already in use.
//
// Timing: token_in, inform_in and the link requests act at the next clock
// edge; token_out follows token_in by one clock; d_set, d_state, inform_out
// and fail are combinational in the same clock as the request. The procedure
// steps follow the document; the token, the clocking and the extra sw_on write
// are this design's choices.
module pe_reconfig_ctrl
  import xccc_pkg::*;
#(
  parameter bit IS_DIM   = 1'b1,  // slot below the spare: has L and U
  parameter bit IS_SPARE = 1'b0,  // the spare slot
  parameter bit HAS_D    = 1'b1   // slot 1 .. K: has a D port
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pe_fault,    // this PE has failed: bypass it
  input  logic        activate,    // enable the spare without steps 2/3
  input  logic        token_in,
  input  logic        pred_sw_on,
  output logic        token_out,
  input  logic        inform_in,
  input  logic        fb_u_req,
  input  logic        fb_d_req,
  input  logic        l_u_req,
  output logic        d_set,
  output scp_state_e  d_state,
  output logic        inform_out,
  output logic        fail,
  output logic        sw_on,
  output logic        byp,
  output logic        l_act,
  output logic        u_act,
  output logic        d_act,
  output logic        f_via_u,
  output logic        b_via_d,
  output lat_route_e  lat_route,
  output logic        ev_shift,    // step 1 took the "L active" branch
  output logic        ev_swon      // step 1 took the "L inactive" branch
);

  logic u_for_l, u_for_f, d_for_l, d_for_b;

  assign u_act   = u_for_l | u_for_f;
  assign d_act   = d_for_l | d_for_b;
  assign f_via_u = u_for_f;
  assign b_via_d = d_for_b;

  always_comb begin
    if (l_act)        lat_route = VIA_L;
    else if (d_for_l) lat_route = VIA_D;
    else if (u_for_l) lat_route = VIA_U;
    else              lat_route = VIA_NONE;
  end

  logic step;
  assign step = token_in && (IS_DIM || IS_SPARE) && HAS_D;

  assign ev_shift   = step && IS_DIM && l_act;
  assign ev_swon    = step && IS_DIM && !l_act;
  assign d_set      = step && !d_act;
  assign d_state    = pred_sw_on ? SCP_V : SCP_X;
  assign inform_out = d_set && !pred_sw_on;

  assign fail = (step && d_act)
              || (inform_in && u_for_f)
              || (fb_u_req && u_act)
              || (fb_d_req && d_act)
              || (l_u_req && u_act)
              || (token_in && !step);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byp       <= IS_SPARE;
      l_act     <= IS_DIM;
      u_for_l   <= 1'b0;
      u_for_f   <= 1'b0;
      d_for_l   <= 1'b0;
      d_for_b   <= 1'b0;
      sw_on     <= 1'b0;
      token_out <= 1'b0;
    end else begin
      token_out <= step && IS_DIM;
      if (pe_fault) byp <= 1'b1;
      if (activate) byp <= 1'b0;
      if (step) begin
        // Step 1
        if (IS_DIM) begin
          // with L inactive, sw_on already tells whether U stood in for a
          // shifted partner (set by inform_in) or for a broken L link
          if (l_act) l_act <= 1'b0;
          else       u_for_l <= 1'b0;
        end
        // Step 2 (step 3 is inform_out)
        if (!d_act) d_for_l <= 1'b1;
        if (IS_SPARE) byp <= 1'b0;
      end
      if (inform_in && !u_for_f) begin
        u_for_l <= 1'b1;
        l_act   <= 1'b0;
        sw_on   <= 1'b1;
      end
      if (fb_u_req && !u_act) u_for_f <= 1'b1;
      if (fb_d_req && !d_act) d_for_b <= 1'b1;
      if (l_u_req && !u_act) begin
        u_for_l <= 1'b1;
        l_act   <= 1'b0;
      end
    end
  end

endmodule
