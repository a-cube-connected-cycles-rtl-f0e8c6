// pe_bypass: the four switches placed around every PE so that a failed PE (or
// an idle spare) can be cut out of its cycle.
//
// Switch 1 connects the PE to its lateral link, switch 2 to the F side of the
// cycle and switch 3 to the B side; switch 4 joins the B side directly to the
// F side. In normal operation switches 1, 2 and 3 are closed and 4 is open; an
// isolated PE has 1, 2 and 3 open and 4 closed, so data passes between its two
// cycle neighbours without it. This switch arrangement is the one drawn for a
// PE; the split of every link into an upward (toward F) and a downward (toward
// B) W-bit channel is this design's choice.
//
// Interface: pe_* are the PE core's own F, B and lateral channels; up_in is the
// word arriving at the B side from the predecessor, dn_in the word arriving at
// the F side from the successor. up_out / dn_out are what leaves at the F / B
// side. up_direct / dn_direct are the same outputs with switch 4 ignored: a
// neighbour feeds them into its own bypass path, so that a chain of rings built
// from these cells never closes a combinational loop (the fabric isolates at
// most one PE per cycle). Everything is combinational.
module pe_bypass #(
  parameter int unsigned W = 16
) (
  input  logic         iso,         // 1: isolate the PE (switches 1-3 open, 4 closed)
  // PE core side
  input  logic [W-1:0] pe_f_out,
  input  logic [W-1:0] pe_b_out,
  input  logic [W-1:0] pe_l_out,
  output logic [W-1:0] pe_f_in,
  output logic [W-1:0] pe_b_in,
  output logic [W-1:0] pe_l_in,
  // cycle side
  input  logic [W-1:0] up_in,       // arrives at B from the predecessor
  input  logic [W-1:0] dn_in,       // arrives at F from the successor
  input  logic [W-1:0] up_byp_in,   // predecessor's direct output, for switch 4
  input  logic [W-1:0] dn_byp_in,   // successor's direct output, for switch 4
  output logic [W-1:0] up_out,      // leaves at F toward the successor
  output logic [W-1:0] dn_out,      // leaves at B toward the predecessor
  output logic [W-1:0] up_direct,   // F output through switch 2 only
  output logic [W-1:0] dn_direct,   // B output through switch 3 only
  // lateral side
  input  logic [W-1:0] l_in,
  output logic [W-1:0] l_out
);

  logic sw1, sw2, sw3, sw4;
  assign sw1 = !iso;
  assign sw2 = !iso;
  assign sw3 = !iso;
  assign sw4 = iso;

  assign up_direct = sw2 ? pe_f_out : '0;
  assign dn_direct = sw3 ? pe_b_out : '0;
  assign up_out    = sw4 ? up_byp_in : up_direct;
  assign dn_out    = sw4 ? dn_byp_in : dn_direct;

  assign pe_f_in   = sw2 ? dn_in : '0;
  assign pe_b_in   = sw3 ? up_in : '0;
  assign pe_l_in   = sw1 ? l_in  : '0;
  assign l_out     = sw1 ? pe_l_out : '0;

endmodule
