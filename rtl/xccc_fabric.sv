// xccc_fabric: the data interconnect of XCCC(H+1, K).
//
// 2^K cycles of H+1 PE slots each. Inside a cycle, slot q's F side is linked to
// slot (q+1) mod (H+1)'s B side; every slot sits behind a pe_bypass cell so an
// isolated PE is skipped. Slots q < K have L links to slot q of cycle
// c xor 2^q. Every pair of partner cycles at dimension p < K shares one switch
// connection pair (scp_switch) joining the U ports of slot p with the D ports
// of slot p+1 of both cycles; so U exists on slots 0 .. K-1 and D on slots
// 1 .. K (K is the spare slot).
//
// Every link is modelled as two one-way W-bit channels and the whole fabric is
// combinational: a word put on a PE's output reaches the connected PE's input
// in the same clock. The *_dead inputs model broken links (the word is lost);
// they are for fault injection, since in silicon a link simply stops working.
// Limitation: the bypass path spans one isolated PE. Two adjacent isolated
// PEs in one cycle (never produced by a successful reconfiguration, which
// allows one isolated slot per cycle) are not bridged.
// Topology and switch placement follow the document's network definition and
// drawings; channel split, widths and the fault-injection inputs are this
// design's choices.
module xccc_fabric
  import xccc_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned H = 4,
  parameter int unsigned K = 3,
  localparam int unsigned NC = 1 << K,
  localparam int unsigned NS = H + 1
) (
  input  logic         iso       [NC][NS],
  input  scp_state_e   scp_state [K][NC],
  input  logic         fb_dead   [NC][NS],   // link between slot q and q+1 broken
  input  logic         l_dead    [NC][NS],   // L link of slot q broken (either end)
  // physical PE ports
  input  logic [W-1:0] f_out [NC][NS],
  input  logic [W-1:0] b_out [NC][NS],
  input  logic [W-1:0] l_out [NC][NS],
  input  logic [W-1:0] u_out [NC][NS],
  input  logic [W-1:0] d_out [NC][NS],
  output logic [W-1:0] f_in  [NC][NS],
  output logic [W-1:0] b_in  [NC][NS],
  output logic [W-1:0] l_in  [NC][NS],
  output logic [W-1:0] u_in  [NC][NS],
  output logic [W-1:0] d_in  [NC][NS]
);

  logic [W-1:0] up_out    [NC][NS];
  logic [W-1:0] dn_out    [NC][NS];
  logic [W-1:0] up_direct [NC][NS];
  logic [W-1:0] dn_direct [NC][NS];
  logic [W-1:0] lat_out   [NC][NS];

  for (genvar c = 0; c < NC; c++) begin : g_cyc
    for (genvar q = 0; q < NS; q++) begin : g_slot
      localparam int unsigned PR = (q + NS - 1) % NS;  // predecessor slot
      localparam int unsigned SU = (q + 1) % NS;       // successor slot

      logic [W-1:0] up_in, dn_in, up_byp_in, dn_byp_in, lat_in;

      // a broken link loses what crosses it; the bypass path crosses two links
      assign up_in     = fb_dead[c][PR] ? '0 : up_out[c][PR];
      assign dn_in     = fb_dead[c][q]  ? '0 : dn_out[c][SU];
      assign up_byp_in = fb_dead[c][PR] ? '0 : up_direct[c][PR];
      assign dn_byp_in = fb_dead[c][q]  ? '0 : dn_direct[c][SU];

      if (q < K) begin : g_lat
        assign lat_in = (l_dead[c][q] || l_dead[c ^ (1 << q)][q]) ? '0
                        : lat_out[c ^ (1 << q)][q];
      end else begin : g_nolat
        assign lat_in = '0;
      end

      pe_bypass #(.W(W)) u_byp (
        .iso      (iso[c][q]),
        .pe_f_out (f_out[c][q]),
        .pe_b_out (b_out[c][q]),
        .pe_l_out ((q < K) ? l_out[c][q] : '0),
        .pe_f_in  (f_in[c][q]),
        .pe_b_in  (b_in[c][q]),
        .pe_l_in  (l_in[c][q]),
        .up_in    (up_in),
        .dn_in    (dn_in),
        .up_byp_in(up_byp_in),
        .dn_byp_in(dn_byp_in),
        .up_out   (up_out[c][q]),
        .dn_out   (dn_out[c][q]),
        .up_direct(up_direct[c][q]),
        .dn_direct(dn_direct[c][q]),
        .l_in     (lat_in),
        .l_out    (lat_out[c][q])
      );
    end
  end

  // cross connections through the SCPs
  for (genvar p = 0; p < K; p++) begin : g_dim
    for (genvar c = 0; c < NC; c++) begin : g_pair
      if (((c >> p) & 1) == 0) begin : g_scp
        localparam int unsigned CB = c ^ (1 << p);
        scp_switch #(.W(W)) u_scp (
          .state   (scp_state[p][c]),
          .a_lo_in (u_out[c][p]),
          .b_lo_in (u_out[CB][p]),
          .a_hi_in (d_out[c][p+1]),
          .b_hi_in (d_out[CB][p+1]),
          .a_lo_out(u_in[c][p]),
          .b_lo_out(u_in[CB][p]),
          .a_hi_out(d_in[c][p+1]),
          .b_hi_out(d_in[CB][p+1])
        );
      end
    end
  end

  // ports that no SCP serves: U above slot K-1, D on slot 0 and above slot K
  for (genvar c = 0; c < NC; c++) begin : g_tie
    for (genvar q = 0; q < NS; q++) begin : g_q
      if (q >= K) begin : g_nou
        assign u_in[c][q] = '0;
      end
      if (q == 0 || q > K) begin : g_nod
        assign d_in[c][q] = '0;
      end
    end
  end

endmodule
