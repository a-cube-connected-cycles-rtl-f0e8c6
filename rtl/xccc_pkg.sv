// xccc_pkg: types and helpers shared by the XCCC (cross-connected cube-connected
// cycles) modules.
//
// Addressing follows the network definition: a PE is (c, q), c the cycle number
// (0 .. 2^K-1) and q its physical slot in the cycle (0 .. H). Slots 0 .. K-1 are
// the dimensional PEs, slot K is the spare that sits directly above them, and
// slots K+1 .. H are the remaining upper PEs. The lateral partner of cycle c at
// dimension p is c + alpha*2^p with alpha = 1 - 2*(bit p of c), which is simply
// c with bit p flipped.
//
// Control-switch states follow the three settings drawn for a switch connection
// pair (SCP): 'X' (straight cross connections), 'V' (the two lower terminals
// joined and the two upper terminals joined) and the state drawn as a
// sideways U (each lower terminal joined to the upper terminal of its own
// cycle), called SCP_SUP here. SCP_OFF (nothing connected) is this design's
// name for a disabled pair.
package xccc_pkg;

  typedef enum logic [1:0] {
    SCP_OFF = 2'd0,
    SCP_X   = 2'd1,
    SCP_V   = 2'd2,
    SCP_SUP = 2'd3
  } scp_state_e;

  // Kind of a reported fault.
  typedef enum logic [1:0] {
    FLT_PE    = 2'd0,  // the PE at (c, q) failed
    FLT_FB    = 2'd1,  // the F/B link between (c, q) and (c, q+1) failed
    FLT_L     = 2'd2,  // the L link of (c, q) failed
    FLT_NONE  = 2'd3
  } fault_kind_e;

  // Where a PE's logical lateral connection currently leaves it.
  typedef enum logic [1:0] {
    VIA_NONE = 2'd0,
    VIA_L    = 2'd1,
    VIA_U    = 2'd2,
    VIA_D    = 2'd3
  } lat_route_e;

  // Broadcast message of the fault-free broadcast algorithm: it carries the
  // weight (-1 for the originating cycle, otherwise the position at which the
  // message entered the cycle), the remaining hop count along the cycle, and a
  // payload.
  localparam int unsigned BC_FIELD_W = 8;
  localparam int unsigned BC_DATA_W  = 16;

  typedef struct packed {
    logic                          valid;
    logic signed [BC_FIELD_W-1:0]  weight;
    logic        [BC_FIELD_W-1:0]  count;
    logic        [BC_DATA_W-1:0]   data;
  } bc_msg_t;

  // Combining operation of a recursive-doubling computation.
  typedef enum logic [1:0] {
    RD_SUM = 2'd0,   // sum modulo 2^W
    RD_MIN = 2'd1,   // unsigned minimum
    RD_MAX = 2'd2    // unsigned maximum
  } rd_op_e;

  // Lateral partner cycle of cycle c at dimension p.
  function automatic int unsigned partner(input int unsigned c, input int unsigned p);
    return c ^ (32'd1 << p);
  endfunction

  // Hop counts for the two directions around a cycle of h active PEs. Together
  // they cover the h-1 other PEs exactly once.
  function automatic int unsigned count_fwd(input int unsigned h);
    return h / 2;             // ceil((h-1)/2)
  endfunction

  function automatic int unsigned count_bwd(input int unsigned h);
    return (h - 1) / 2;       // floor((h-1)/2)
  endfunction

endpackage
