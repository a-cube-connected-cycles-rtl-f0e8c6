// pe_port_steer: connects a PE core's logical ports (F, B, L) to its five
// physical ports (F, B, L, U, D) as the reconfiguration state requires.
//
// After reconfiguration a PE may reach its logical neighbours over its cross
// connections instead of its regular links:
//   f_via_u   : its F link failed; logical F leaves through U (SCP in the '⊃' state)
//   b_via_d   : its B link failed; logical B leaves through D
//   lat_route : its logical lateral link leaves through L, U or D, or is unused
// In performance mode (perf = 1, the fault-free network with every cross
// connection enabled) the U and D ports are handed to the core unchanged as
// two extra ports x_u / x_d. Which physical port carries which logical link
// follows the reconfiguration rules; collecting that choice in one
// combinational steering cell per PE is this design's arrangement.
module pe_port_steer
  import xccc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         perf,
  input  logic         f_via_u,
  input  logic         b_via_d,
  input  lat_route_e   lat_route,
  // logical side (PE core)
  input  logic [W-1:0] log_f_out,
  input  logic [W-1:0] log_b_out,
  input  logic [W-1:0] log_l_out,
  input  logic [W-1:0] x_u_out,
  input  logic [W-1:0] x_d_out,
  output logic [W-1:0] log_f_in,
  output logic [W-1:0] log_b_in,
  output logic [W-1:0] log_l_in,
  output logic [W-1:0] x_u_in,
  output logic [W-1:0] x_d_in,
  // physical side
  output logic [W-1:0] phy_f_out,
  output logic [W-1:0] phy_b_out,
  output logic [W-1:0] phy_l_out,
  output logic [W-1:0] phy_u_out,
  output logic [W-1:0] phy_d_out,
  input  logic [W-1:0] phy_f_in,
  input  logic [W-1:0] phy_b_in,
  input  logic [W-1:0] phy_l_in,
  input  logic [W-1:0] phy_u_in,
  input  logic [W-1:0] phy_d_in
);

  always_comb begin
    phy_f_out = f_via_u ? '0 : log_f_out;
    phy_b_out = b_via_d ? '0 : log_b_out;
    phy_l_out = (lat_route == VIA_L) ? log_l_out : '0;

    if (perf)                    phy_u_out = x_u_out;
    else if (f_via_u)            phy_u_out = log_f_out;
    else if (lat_route == VIA_U) phy_u_out = log_l_out;
    else                         phy_u_out = '0;

    if (perf)                    phy_d_out = x_d_out;
    else if (b_via_d)            phy_d_out = log_b_out;
    else if (lat_route == VIA_D) phy_d_out = log_l_out;
    else                         phy_d_out = '0;

    log_f_in = (f_via_u && !perf) ? phy_u_in : phy_f_in;
    log_b_in = (b_via_d && !perf) ? phy_d_in : phy_b_in;
    unique case (lat_route)
      VIA_L:   log_l_in = phy_l_in;
      VIA_U:   log_l_in = perf ? '0 : phy_u_in;
      VIA_D:   log_l_in = perf ? '0 : phy_d_in;
      default: log_l_in = '0;
    endcase

    x_u_in = perf ? phy_u_in : '0;
    x_d_in = perf ? phy_d_in : '0;
  end

endmodule
