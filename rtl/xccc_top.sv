// xccc_top: a fault-tolerant cube-connected-cycles network, XCCC(H+1, K).
//
// 2^K cycles each hold H working PEs plus one spare placed just above the K
// dimensional PEs. Besides the usual F, B and L links every PE of the lower
// part has U and D cross connections to the partner cycle one dimension up,
// with a control switch (SCP) where each pair of cross connections crosses.
//
// Inside are:
//   xccc_reconfig   the PE controllers and SCP states; takes fault reports
//   xccc_fabric     the links, PE bypass switches and SCPs (data plane)
//   pe_port_steer   one per PE: logical F/B/L onto physical F/B/L/U/D
//   xccc_bcast_net  the broadcast algorithm of the fault-free network
//   xccc_dual_rd    two recursive-doubling computations sharing the PEs
// The PE cores themselves are outside: each physical slot (c, q) offers a
// logical port set pe_*_out / pe_*_in plus pe_active (the slot holds a working
// PE). After any sequence of tolerable faults the logical ports of the working
// PEs are connected exactly like a plain CCC(H, K).
//
// Modes: after reset the network runs fault-free in performance mode, where
// every cross connection is enabled (X state), the raw U/D ports are offered as
// pe_xu_* / pe_xd_*, broadcasts (bc_*) may be started and pairs of data sets
// may be fed to the dual recursive-doubling pipeline (rd_*). The first fault
// report switches to fault-tolerant mode: cross connections are disabled and
// only reconfiguration enables them; broadcast starts and pipeline inputs are
// then ignored.
// fb_dead / l_dead inject broken links into the data plane for testing.
// The broadcast layer exists only when H > K.
// Timing: the data plane is combinational; reconfiguration takes one clock
// per PE involved; a broadcast one clock per hop; a recursive-doubling
// result appears K+1 clocks after its data sets enter.
module xccc_top
  import xccc_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned H = 4,
  parameter int unsigned K = 3,
  localparam int unsigned NC = 1 << K,
  localparam int unsigned NS = H + 1,
  localparam int unsigned CW = (K > 0) ? K : 1,
  localparam int unsigned QW = $clog2(NS + 1),
  localparam int unsigned PW = (H > 1) ? $clog2(H) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // fault reports
  input  logic         fault_valid,
  input  fault_kind_e  fault_kind,
  input  logic [CW-1:0] fault_c,
  input  logic [QW-1:0] fault_q,
  output logic         fault_ready,
  output logic         ft_mode,
  output logic         busy,
  output logic         fail,
  output logic [7:0]   events,      // shift, swon, X, V, SUP, inform, spare, fail
  output scp_state_e   scp_state [K][NC],
  // fault injection in the data plane
  input  logic         fb_dead [NC][NS],
  input  logic         l_dead  [NC][NS],
  // PE core ports, per physical slot
  output logic         pe_active [NC][NS],
  output logic         l_act     [NC][NS],  // link activation, per slot
  output logic         u_act     [NC][NS],
  output logic         d_act     [NC][NS],
  input  logic [W-1:0] pe_f_out  [NC][NS],
  input  logic [W-1:0] pe_b_out  [NC][NS],
  input  logic [W-1:0] pe_l_out  [NC][NS],
  input  logic [W-1:0] pe_xu_out [NC][NS],
  input  logic [W-1:0] pe_xd_out [NC][NS],
  output logic [W-1:0] pe_f_in   [NC][NS],
  output logic [W-1:0] pe_b_in   [NC][NS],
  output logic [W-1:0] pe_l_in   [NC][NS],
  output logic [W-1:0] pe_xu_in  [NC][NS],
  output logic [W-1:0] pe_xd_in  [NC][NS],
  // broadcast (performance mode)
  input  logic                         bc_start,
  input  logic [CW-1:0]                bc_c,
  input  logic [PW-1:0]                bc_p,
  input  logic [BC_DATA_W-1:0]         bc_data,
  output logic                         bc_reached [NC][H],
  output logic signed [BC_FIELD_W-1:0] bc_weight  [NC][H],
  output logic [BC_DATA_W-1:0]         bc_rx_data [NC][H],
  output logic                         bc_done,
  output logic [7:0]                   bc_steps,
  output logic                         bc_dup,
  // dual recursive-doubling pipeline (performance mode)
  input  logic                         rd_in_valid,
  input  rd_op_e                       rd_in_op,
  input  logic [W-1:0]                 rd_in_a [NC],
  input  logic [W-1:0]                 rd_in_b [NC],
  output logic                         rd_out_valid,
  output rd_op_e                       rd_out_op,
  output logic [W-1:0]                 rd_out_a [NC],
  output logic [W-1:0]                 rd_out_b [NC]
);

  logic       byp       [NC][NS];
  logic       f_via_u   [NC][NS];
  logic       b_via_d   [NC][NS];
  lat_route_e lat_route [NC][NS];

  xccc_reconfig #(.H(H), .K(K)) u_reconfig (
    .clk, .rst_n,
    .fault_valid, .fault_kind, .fault_c, .fault_q,
    .fault_ready, .ft_mode, .busy, .fail,
    .byp, .f_via_u, .b_via_d, .lat_route, .l_act, .u_act, .d_act,
    .scp_state,
    .ev_shift   (events[0]),
    .ev_swon    (events[1]),
    .ev_set_x   (events[2]),
    .ev_set_v   (events[3]),
    .ev_set_sup (events[4]),
    .ev_inform  (events[5]),
    .ev_spare_on(events[6]),
    .ev_fail    (events[7])
  );

  logic [W-1:0] phy_f_out [NC][NS], phy_b_out [NC][NS], phy_l_out [NC][NS];
  logic [W-1:0] phy_u_out [NC][NS], phy_d_out [NC][NS];
  logic [W-1:0] phy_f_in  [NC][NS], phy_b_in  [NC][NS], phy_l_in  [NC][NS];
  logic [W-1:0] phy_u_in  [NC][NS], phy_d_in  [NC][NS];

  for (genvar c = 0; c < NC; c++) begin : g_cyc
    for (genvar q = 0; q < NS; q++) begin : g_slot
      assign pe_active[c][q] = !byp[c][q];
      pe_port_steer #(.W(W)) u_steer (
        .perf     (!ft_mode),
        .f_via_u  (f_via_u[c][q]),
        .b_via_d  (b_via_d[c][q]),
        .lat_route(lat_route[c][q]),
        .log_f_out(pe_f_out[c][q]),
        .log_b_out(pe_b_out[c][q]),
        .log_l_out(pe_l_out[c][q]),
        .x_u_out  (pe_xu_out[c][q]),
        .x_d_out  (pe_xd_out[c][q]),
        .log_f_in (pe_f_in[c][q]),
        .log_b_in (pe_b_in[c][q]),
        .log_l_in (pe_l_in[c][q]),
        .x_u_in   (pe_xu_in[c][q]),
        .x_d_in   (pe_xd_in[c][q]),
        .phy_f_out(phy_f_out[c][q]),
        .phy_b_out(phy_b_out[c][q]),
        .phy_l_out(phy_l_out[c][q]),
        .phy_u_out(phy_u_out[c][q]),
        .phy_d_out(phy_d_out[c][q]),
        .phy_f_in (phy_f_in[c][q]),
        .phy_b_in (phy_b_in[c][q]),
        .phy_l_in (phy_l_in[c][q]),
        .phy_u_in (phy_u_in[c][q]),
        .phy_d_in (phy_d_in[c][q])
      );
    end
  end

  xccc_fabric #(.W(W), .H(H), .K(K)) u_fabric (
    .iso      (byp),
    .scp_state(scp_state),
    .fb_dead, .l_dead,
    .f_out(phy_f_out), .b_out(phy_b_out), .l_out(phy_l_out),
    .u_out(phy_u_out), .d_out(phy_d_out),
    .f_in (phy_f_in),  .b_in (phy_b_in),  .l_in (phy_l_in),
    .u_in (phy_u_in),  .d_in (phy_d_in)
  );

  xccc_dual_rd #(.W(W), .K(K)) u_dual_rd (
    .clk, .rst_n,
    .in_valid (rd_in_valid && !ft_mode),
    .in_op    (rd_in_op),
    .in_a     (rd_in_a),
    .in_b     (rd_in_b),
    .out_valid(rd_out_valid),
    .out_op   (rd_out_op),
    .out_a    (rd_out_a),
    .out_b    (rd_out_b)
  );

  // The broadcast layer needs H > K (the last U link must land on a working
  // PE); for XCCC(K+1, K) it is left out and its outputs read 0.
  if (H > K) begin : g_bcast
    xccc_bcast_net #(.H(H), .K(K)) u_bcast (
      .clk, .rst_n,
      .start     (bc_start && !ft_mode),
      .start_c   (bc_c),
      .start_p   (bc_p),
      .start_data(bc_data),
      .reached   (bc_reached),
      .weight    (bc_weight),
      .data      (bc_rx_data),
      .done      (bc_done),
      .steps     (bc_steps),
      .dup_err   (bc_dup)
    );
  end else begin : g_no_bcast
    always_comb begin
      for (int c = 0; c < NC; c++)
        for (int p = 0; p < H; p++) begin
          bc_reached[c][p] = 1'b0;
          bc_weight[c][p]  = '0;
          bc_rx_data[c][p] = '0;
        end
    end
    assign bc_done  = 1'b0;
    assign bc_steps = '0;
    assign bc_dup   = 1'b0;
  end

endmodule
