// bcast_node: the broadcast forwarding rule of one PE in the fault-free XCCC.
//
// A broadcast leaves its cycle over U links (to the partner cycle's PE one
// position higher) instead of L links. Each message carries a weight and a
// count. The PE at position P of a cycle of H active PEs applies:
//   originate (start): weight = -1; send over F with count CF, over B with
//     count CB, and over U.
//   from D: weight = P; send over F with count CF, over B with count CB, and
//     over U if this PE has one.
//   from F or B: keep the message's weight; if P > weight send over U (if
//     present); decrement count and, if it is still above 0, pass the message
//     on in the same direction (out of B when it came in on F, and vice versa).
// CF = ceil((H-1)/2) and CB = floor((H-1)/2), so the two directions together
// visit each other PE of the cycle once. Every PE at a position at or above
// the weight sends over U once, so each cycle is entered exactly once.
// The rule follows the document's broadcast algorithm and its worked example;
// the unequal F/B counts and sending over U independently of the count are
// this design's reading of that example.
//
// Timing: one hop per clock. A message arriving in clock t is sent on in
// clock t+1 (tx_* are registers). reached, weight and data record the copy
// this PE received; dup flags a second copy. clear (the start of any broadcast
// in the network) forgets the previous broadcast. A message arriving over D
// is used only for its valid bit and payload: the receiver sets weight and
// count itself, so those fields of rx_d are left unread.
module bcast_node
  import xccc_pkg::*;
#(
  parameter int unsigned H     = 4,
  parameter int unsigned P     = 0,
  parameter bit          HAS_U = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        start,
  input  logic [BC_DATA_W-1:0]        start_data,
  input  bc_msg_t                     rx_f,
  input  bc_msg_t                     rx_b,
  input  bc_msg_t                     rx_d,
  output bc_msg_t                     tx_f,
  output bc_msg_t                     tx_b,
  output bc_msg_t                     tx_u,
  output logic                        reached,
  output logic signed [BC_FIELD_W-1:0] weight,
  output logic [BC_DATA_W-1:0]        data,
  output logic                        dup
);

  localparam logic [BC_FIELD_W-1:0] CF = BC_FIELD_W'(count_fwd(H));
  localparam logic [BC_FIELD_W-1:0] CB = BC_FIELD_W'(count_bwd(H));
  localparam logic signed [BC_FIELD_W-1:0] POS = BC_FIELD_W'(P);

  bc_msg_t nf, nb, nu;
  logic                         got;
  logic signed [BC_FIELD_W-1:0] w_n;
  logic [BC_DATA_W-1:0]         d_n;
  logic                         many;
  bc_msg_t                      m;
  logic [BC_FIELD_W-1:0]        n;

  function automatic bc_msg_t mk(input logic signed [BC_FIELD_W-1:0] w,
                                 input logic [BC_FIELD_W-1:0] cnt,
                                 input logic [BC_DATA_W-1:0] d);
    bc_msg_t r;
    r.valid  = 1'b1;
    r.weight = w;
    r.count  = cnt;
    r.data   = d;
    return r;
  endfunction

  always_comb begin
    nf = '0; nb = '0; nu = '0;
    got = 1'b1; w_n = weight; d_n = data;
    m = rx_f.valid ? rx_f : rx_b;
    n = m.count - 1'b1;
    many = (32'(rx_f.valid) + 32'(rx_b.valid) + 32'(rx_d.valid) + 32'(start)) > 1;
    if (start) begin
      w_n = -1;
      d_n = start_data;
      if (CF != 0) nf = mk(w_n, CF, d_n);
      if (CB != 0) nb = mk(w_n, CB, d_n);
      if (HAS_U)   nu = mk(w_n, '0, d_n);
    end else if (rx_d.valid) begin
      w_n = POS;
      d_n = rx_d.data;
      if (CF != 0) nf = mk(w_n, CF, d_n);
      if (CB != 0) nb = mk(w_n, CB, d_n);
      if (HAS_U)   nu = mk(w_n, '0, d_n);
    end else if (m.valid) begin
      w_n = m.weight;
      d_n = m.data;
      if (HAS_U && POS > m.weight) nu = mk(w_n, '0, d_n);
      if (n != 0) begin
        if (rx_f.valid) nb = mk(w_n, n, d_n);
        else            nf = mk(w_n, n, d_n);
      end
    end else begin
      got = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_f    <= '0;
      tx_b    <= '0;
      tx_u    <= '0;
      reached <= 1'b0;
      weight  <= '0;
      data    <= '0;
      dup     <= 1'b0;
    end else begin
      tx_f <= nf;
      tx_b <= nb;
      tx_u <= nu;
      if (clear && !start) begin
        reached <= 1'b0;
        dup     <= 1'b0;
      end
      if (got) begin
        reached <= 1'b1;
        weight  <= w_n;
        data    <= d_n;
        if ((reached && !clear) || many) dup <= 1'b1;
      end
    end
  end

endmodule
