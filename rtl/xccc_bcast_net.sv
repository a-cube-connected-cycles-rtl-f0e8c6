// xccc_bcast_net: broadcasting in the fault-free XCCC(H+1, K).
//
// 2^K cycles of H active PEs (the idle spares take no part), each with a
// bcast_node. Inside a cycle, F of position p feeds B of position (p+1) mod H
// and back. For p < K (and p+1 < H) the U link of PE(c, p) reaches the D link
// of PE(c xor 2^p, p+1): the cross connections with every SCP in the X state.
// So the farthest cycle is reached over U_0, U_1, ..., U_{K-1} in K hops, and a
// whole broadcast takes between K + ceil((H-1)/2) and K + 2*ceil((H-1)/2)
// clocks.
//
// Interface: a start pulse with start_c / start_p / start_data originates a
// broadcast at PE(start_c, start_p); every PE's reached / weight / data show
// what it received; done rises once every PE has been reached and steps then
// holds the number of clocks (hops) the broadcast took; dup_err is set if any
// PE received more than one copy. One hop per clock.
// The topology and the forwarding rule follow the document; the counter and
// flags are this design's observation aids. H must exceed K: with H = K the
// last U link would land on the idle spare, which this layer does not model.
module xccc_bcast_net
  import xccc_pkg::*;
#(
  parameter int unsigned H = 4,
  parameter int unsigned K = 3,
  localparam int unsigned NC = 1 << K,
  localparam int unsigned CW = (K > 0) ? K : 1,
  localparam int unsigned PW = (H > 1) ? $clog2(H) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [CW-1:0]                start_c,
  input  logic [PW-1:0]                start_p,
  input  logic [BC_DATA_W-1:0]         start_data,
  output logic                         reached [NC][H],
  output logic signed [BC_FIELD_W-1:0] weight  [NC][H],
  output logic [BC_DATA_W-1:0]         data    [NC][H],
  output logic                         done,
  output logic [7:0]                   steps,
  output logic                         dup_err
);

  // U_{K-1} must land on a working PE at position K: needs H > K
  if (H <= K) begin : g_bad_size
    $error("xccc_bcast_net needs H > K");
  end

  bc_msg_t tx_f [NC][H];
  bc_msg_t tx_b [NC][H];
  bc_msg_t tx_u [NC][H];
  logic    dup  [NC][H];

  for (genvar c = 0; c < NC; c++) begin : g_cyc
    for (genvar p = 0; p < H; p++) begin : g_pos
      bc_msg_t rx_d;
      if (p >= 1 && p - 1 < K) begin : g_d
        assign rx_d = tx_u[c ^ (1 << (p - 1))][p - 1];
      end else begin : g_nod
        assign rx_d = '0;
      end

      bcast_node #(
        .H    (H),
        .P    (p),
        .HAS_U((p < K) && (p + 1 < H))
      ) u_node (
        .clk, .rst_n,
        .clear     (start),
        .start     (start && start_c == CW'(c) && start_p == PW'(p)),
        .start_data(start_data),
        .rx_f      (tx_b[c][(p + 1) % H]),
        .rx_b      (tx_f[c][(p + H - 1) % H]),
        .rx_d      (rx_d),
        .tx_f      (tx_f[c][p]),
        .tx_b      (tx_b[c][p]),
        .tx_u      (tx_u[c][p]),
        .reached   (reached[c][p]),
        .weight    (weight[c][p]),
        .data      (data[c][p]),
        .dup       (dup[c][p])
      );
    end
  end

  logic all_r, any_dup, running;
  always_comb begin
    all_r = 1'b1;
    any_dup = 1'b0;
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < H; p++) begin
        all_r   = all_r & reached[c][p];
        any_dup = any_dup | dup[c][p];
      end
  end

  assign done    = all_r && !running && !start;
  assign dup_err = any_dup;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      steps   <= '0;
    end else if (start) begin
      running <= 1'b1;
      steps   <= '0;
    end else if (running) begin
      if (all_r) running <= 1'b0;
      else       steps   <= steps + 1'b1;
    end
  end

endmodule
