// scp_switch: the control switch of one switch connection pair (SCP).
//
// An SCP joins four PEs of two lateral partner cycles ca and cb (ca has bit p
// clear) at dimensions p and p+1. Its four terminals are
//   a_lo : U port of PE(ca, p)      b_lo : U port of PE(cb, p)
//   a_hi : D port of PE(ca, p+1)    b_hi : D port of PE(cb, p+1)
// and the switch joins them pairwise according to its state:
//   SCP_X   : a_lo <-> b_hi, b_lo <-> a_hi   (the two cross connections)
//   SCP_V   : a_lo <-> b_lo, a_hi <-> b_hi   (replaces an L link, or joins two D's)
//   SCP_SUP : a_lo <-> a_hi, b_lo <-> b_hi   (replaces an F/B link inside a cycle)
//   SCP_OFF : nothing joined, every output is 0
// The three connected states and their pairings are the ones drawn for the
// switch; the OFF state and the modelling of each bidirectional link as two
// W-bit one-way channels are this design's choices. The switch is purely
// combinational: a word presented on a terminal input appears on the joined
// terminal output in the same cycle. The state is held by the reconfiguration
// controller.
module scp_switch
  import xccc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  scp_state_e     state,
  input  logic [W-1:0]   a_lo_in,
  input  logic [W-1:0]   b_lo_in,
  input  logic [W-1:0]   a_hi_in,
  input  logic [W-1:0]   b_hi_in,
  output logic [W-1:0]   a_lo_out,
  output logic [W-1:0]   b_lo_out,
  output logic [W-1:0]   a_hi_out,
  output logic [W-1:0]   b_hi_out
);

  always_comb begin
    a_lo_out = '0;
    b_lo_out = '0;
    a_hi_out = '0;
    b_hi_out = '0;
    unique case (state)
      SCP_X: begin
        a_lo_out = b_hi_in;  b_hi_out = a_lo_in;
        b_lo_out = a_hi_in;  a_hi_out = b_lo_in;
      end
      SCP_V: begin
        a_lo_out = b_lo_in;  b_lo_out = a_lo_in;
        a_hi_out = b_hi_in;  b_hi_out = a_hi_in;
      end
      SCP_SUP: begin
        a_lo_out = a_hi_in;  a_hi_out = a_lo_in;
        b_lo_out = b_hi_in;  b_hi_out = b_lo_in;
      end
      default: ;
    endcase
  end

endmodule
