// xccc_reconfig: reconfiguration control of a whole XCCC(H+1, K).
//
// It holds one pe_reconfig_ctrl per PE (2^K cycles of H+1 slots) and the state
// of every switch connection pair (K * 2^(K-1) of them), and it accepts one
// fault report at a time.
//
// After reset the network is in performance mode: no fault is known, every SCP
// reads as X and every U/D cross connection may be used (ft_mode = 0). The
// first fault report switches to fault-tolerant mode for good: all SCPs are
// disabled (OFF) and only the reconfiguration procedure enables them again.
//
// Fault reports (fault_valid, accepted when fault_ready):
//   FLT_PE at (c, q): PE(c, q) is bypassed. For q < K a token starts at
//     PE(c, q+1) in the next clock and walks up one PE per clock to the spare
//     (slot K), each PE performing the procedure of pe_reconfig_ctrl; so
//     reconfiguration takes K - q clocks, fewer for higher dimensions. For
//     q = K (the spare itself) nothing else happens; for q > K the spare is
//     simply enabled. A second PE fault in a cycle is reported as a failure.
//   FLT_FB at (c, q): the F/B link between (c, q) and (c, q+1) failed; PE(c, q)
//     uses U, PE(c, q+1) uses D, and their SCP is set to the '⊃' state (SUP).
//   FLT_L at (c, q): the L link between (c, q) and (c', q) failed; both use U
//     and the SCP is set to V.
// A link fault needs an SCP that is not in use yet, and only links at
// dimensions below K have one; otherwise the report fails. fail is sticky
// until reset. ev_* outputs pulse once per event for observation.
module xccc_reconfig
  import xccc_pkg::*;
#(
  parameter int unsigned H = 4,
  parameter int unsigned K = 3,
  localparam int unsigned NC = 1 << K,
  localparam int unsigned NS = H + 1,
  localparam int unsigned CW = (K > 0) ? K : 1,
  localparam int unsigned QW = $clog2(NS + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fault_valid,
  input  fault_kind_e  fault_kind,
  input  logic [CW-1:0] fault_c,
  input  logic [QW-1:0] fault_q,
  output logic         fault_ready,
  output logic         ft_mode,
  output logic         busy,
  output logic         fail,
  // per-PE state, [cycle][slot]
  output logic         byp       [NC][NS],
  output logic         f_via_u   [NC][NS],
  output logic         b_via_d   [NC][NS],
  output lat_route_e   lat_route [NC][NS],
  output logic         l_act     [NC][NS],
  output logic         u_act     [NC][NS],
  output logic         d_act     [NC][NS],
  // SCP state, [dimension][cycle]: both cycles of a pair read the same state
  output scp_state_e   scp_state [K][NC],
  // event pulses
  output logic         ev_shift,
  output logic         ev_swon,
  output logic         ev_set_x,
  output logic         ev_set_v,
  output logic         ev_set_sup,
  output logic         ev_inform,
  output logic         ev_spare_on,
  output logic         ev_fail
);

  // ---------------------------------------------------------------- per-PE
  logic       pe_fault  [NC][NS];
  logic       activate  [NC][NS];
  logic       token_in  [NC][NS];
  logic       token_out [NC][NS];
  logic       inform_in [NC][NS];
  logic       inform_out[NC][NS];
  logic       fb_u_req  [NC][NS];
  logic       fb_d_req  [NC][NS];
  logic       l_u_req   [NC][NS];
  logic       d_set     [NC][NS];
  scp_state_e d_state   [NC][NS];
  logic       pe_fail   [NC][NS];
  logic       sw_on     [NC][NS];
  logic       e_shift   [NC][NS];
  logic       e_swon    [NC][NS];
  logic       start_tok [NC][NS];

  scp_state_e scp_q [K][NC/2];   // one entry per SCP
  logic       cyc_faulty [NC];

  // accepted report, decoded
  logic acc;
  assign fault_ready = !busy;
  assign acc = fault_valid && fault_ready && (fault_kind != FLT_NONE);

  for (genvar c = 0; c < NC; c++) begin : g_cyc
    for (genvar q = 0; q < NS; q++) begin : g_slot
      pe_reconfig_ctrl #(
        .IS_DIM  (q < K),
        .IS_SPARE(q == K),
        .HAS_D   ((q >= 1) && (q <= K))
      ) u_ctrl (
        .clk, .rst_n,
        .pe_fault  (pe_fault[c][q]),
        .activate  (activate[c][q]),
        .token_in  (token_in[c][q]),
        .pred_sw_on((q == 0) ? 1'b0 : sw_on[c][(q == 0) ? 0 : q-1]),
        .token_out (token_out[c][q]),
        .inform_in (inform_in[c][q]),
        .fb_u_req  (fb_u_req[c][q]),
        .fb_d_req  (fb_d_req[c][q]),
        .l_u_req   (l_u_req[c][q]),
        .d_set     (d_set[c][q]),
        .d_state   (d_state[c][q]),
        .inform_out(inform_out[c][q]),
        .fail      (pe_fail[c][q]),
        .sw_on     (sw_on[c][q]),
        .byp       (byp[c][q]),
        .l_act     (l_act[c][q]),
        .u_act     (u_act[c][q]),
        .d_act     (d_act[c][q]),
        .f_via_u   (f_via_u[c][q]),
        .b_via_d   (b_via_d[c][q]),
        .lat_route (lat_route[c][q]),
        .ev_shift  (e_shift[c][q]),
        .ev_swon   (e_swon[c][q])
      );

      // The token enters above a failed PE and moves up to the spare.
      if (q == 0) begin : g_t0
        assign token_in[c][q] = 1'b0;
      end else if (q <= K) begin : g_tk
        assign token_in[c][q] = start_tok[c][q] | token_out[c][q-1];
      end else begin : g_tu
        assign token_in[c][q] = 1'b0;
      end

      // Step 3 of PE(c', q+1) addresses the U end of the same SCP, PE(c, q).
      if (q < K) begin : g_inf
        assign inform_in[c][q] = inform_out[c ^ (1 << q)][q+1];
      end else begin : g_noinf
        assign inform_in[c][q] = 1'b0;
      end

      always_comb begin
        pe_fault[c][q] = acc && fault_kind == FLT_PE && fault_c == CW'(c) && fault_q == QW'(q);
        activate[c][q] = (q == K) && acc && fault_kind == FLT_PE && fault_c == CW'(c)
                         && fault_q > QW'(K) && fault_q < QW'(NS) && !cyc_faulty[c];
        fb_u_req[c][q] = acc && fault_kind == FLT_FB && fault_c == CW'(c)
                         && fault_q == QW'(q) && q < K;
        fb_d_req[c][q] = acc && fault_kind == FLT_FB && fault_c == CW'(c)
                         && fault_q == QW'(q - 1) && q >= 1 && q <= K;
        l_u_req[c][q]  = acc && fault_kind == FLT_L && q < K && fault_q == QW'(q)
                         && (fault_c == CW'(c) || fault_c == CW'(c ^ (1 << q)));
      end
    end
  end

  // start tokens: registered so the first PE acts one clock after the report
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NC; c++)
        for (int q = 0; q < NS; q++) start_tok[c][q] <= 1'b0;
    end else begin
      for (int c = 0; c < NC; c++)
        for (int q = 0; q < NS; q++)
          start_tok[c][q] <= acc && fault_kind == FLT_PE && fault_c == CW'(c)
                             && q >= 1 && q <= K && fault_q == QW'(q - 1)
                             && !cyc_faulty[c];
    end
  end

  // busy while a token is in flight
  always_comb begin
    busy = 1'b0;
    for (int c = 0; c < NC; c++)
      for (int q = 0; q < NS; q++)
        busy = busy | start_tok[c][q] | token_out[c][q];
  end

  // ------------------------------------------------------- report checks
  logic rep_fail;
  logic scp_used;
  assign scp_used = (fault_q < QW'(K))
                    && scp_q[int'(fault_q) % K][pidx(int'(fault_c), int'(fault_q) % K)] != SCP_OFF;
  always_comb begin
    rep_fail = 1'b0;
    if (acc) begin
      unique case (fault_kind)
        FLT_PE: rep_fail = (fault_q >= QW'(NS)) || cyc_faulty[fault_c];
        FLT_FB: rep_fail = (fault_q >= QW'(K)) || scp_used;
        FLT_L:  rep_fail = (fault_q >= QW'(K)) || scp_used;
        default: rep_fail = 1'b0;
      endcase
    end
  end

  // SCP number within dimension p of the pair that cycle c belongs to: c with
  // bit p removed
  function automatic int unsigned pidx(input int unsigned c, input int unsigned p);
    return ((c >> (p + 1)) << p) | (c & ((1 << p) - 1));
  endfunction

  // lower cycle (bit p clear) of SCP number i of dimension p
  function automatic int unsigned pexp(input int unsigned i, input int unsigned p);
    return ((i >> p) << (p + 1)) | (i & ((1 << p) - 1));
  endfunction

  // ------------------------------------------------------------ SCP state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < K; p++)
        for (int i = 0; i < NC / 2; i++) scp_q[p][i] <= SCP_OFF;
    end else begin
      for (int p = 0; p < K; p++) begin
        for (int i = 0; i < NC / 2; i++) begin
          int unsigned c;
          c = pexp(i, p);
          // step 2 of either upper PE of the pair
          if (d_set[c][p+1])            scp_q[p][i] <= d_state[c][p+1];
          if (d_set[c ^ (1 << p)][p+1]) scp_q[p][i] <= d_state[c ^ (1 << p)][p+1];
          // link faults
          if (acc && !rep_fail && fault_q == QW'(p)
              && (fault_c == CW'(c) || fault_c == CW'(c ^ (1 << p)))) begin
            if (fault_kind == FLT_FB) scp_q[p][i] <= SCP_SUP;
            if (fault_kind == FLT_L)  scp_q[p][i] <= SCP_V;
          end
        end
      end
    end
  end

  // performance mode shows every SCP in the X state
  always_comb begin
    for (int p = 0; p < K; p++)
      for (int c = 0; c < NC; c++)
        scp_state[p][c] = ft_mode ? scp_q[p][pidx(c, p)] : SCP_X;
  end

  // --------------------------------------------------------- mode, faults
  logic any_pe_fail;
  always_comb begin
    any_pe_fail = 1'b0;
    for (int c = 0; c < NC; c++)
      for (int q = 0; q < NS; q++)
        any_pe_fail = any_pe_fail | pe_fail[c][q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ft_mode <= 1'b0;
      fail    <= 1'b0;
      for (int c = 0; c < NC; c++) cyc_faulty[c] <= 1'b0;
    end else begin
      if (acc) ft_mode <= 1'b1;
      if (ev_fail) fail <= 1'b1;
      if (acc && fault_kind == FLT_PE && fault_q < QW'(NS)) cyc_faulty[fault_c] <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    ev_shift = 1'b0; ev_swon = 1'b0; ev_set_x = 1'b0; ev_set_v = 1'b0;
    ev_inform = 1'b0; ev_spare_on = 1'b0;
    for (int c = 0; c < NC; c++)
      for (int q = 0; q < NS; q++) begin
        ev_shift    = ev_shift  | e_shift[c][q];
        ev_swon     = ev_swon   | e_swon[c][q];
        ev_set_x    = ev_set_x  | (d_set[c][q] && d_state[c][q] == SCP_X);
        ev_set_v    = ev_set_v  | (d_set[c][q] && d_state[c][q] == SCP_V);
        ev_inform   = ev_inform | inform_out[c][q];
        ev_spare_on = ev_spare_on | activate[c][q] | (q == K && token_in[c][q]);
      end
    ev_set_v   = ev_set_v | (acc && !rep_fail && fault_kind == FLT_L);
    ev_set_sup = acc && !rep_fail && fault_kind == FLT_FB;
    ev_fail    = any_pe_fail | rep_fail;
  end

endmodule
