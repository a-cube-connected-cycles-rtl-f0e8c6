// xccc_dual_rd: two recursive-doubling computations running at once on the
// fault-free XCCC(H+1, K).
//
// A recursive-doubling reduction (sum, minimum, maximum) over the 2^K cycles
// takes K steps. At step p every dimensional PE(c, p) swaps its partial result
// with PE(c xor 2^p, p) over L and combines the two; after step K-1 each
// cycle holds the result over all cycles. On a plain CCC the combined value
// then climbs to the next dimension over F. The XCCC has a second path up:
// U of PE(c, p) lands on D of PE(c xor 2^p, p+1), and since both ends of an L
// link hold the same combined value, sending it over U is as good as sending
// it over F. So two independent data sets can share the PEs: set A climbs over
// F/B, set B over U/D, and both use the L links. Every PE then receives two
// words per step, one on B and one on D.
//
// Both sets enter at the bottom PEs (slot 0) together. Each PE step is one
// clock and the steps are pipelined, so a new pair of data sets may enter on
// every clock. The results arrive at slot K of every cycle (the spare slot,
// which in the fault-free network has its ports free): out_a on its B link,
// out_b on its D link, K+1 clocks after in_valid (one clock to load the
// bottom PEs, then one per dimension).
//
// Interface: in_valid, in_op (an rd_op_e, applied to both sets), in_a/in_b
// (one word per cycle) -> out_valid, out_op, out_a/out_b (one word per cycle,
// all equal within a set). The L link is taken to carry a word of each set in
// one step (its width is this design's choice). The op travels with the data,
// so it may change on every clock. Only the fault-free (performance mode)
// network has its cross connections available for set B.
module xccc_dual_rd
  import xccc_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned K = 3,
  localparam int unsigned NC = 1 << K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  rd_op_e       in_op,
  input  logic [W-1:0] in_a [NC],
  input  logic [W-1:0] in_b [NC],
  output logic         out_valid,
  output rd_op_e       out_op,
  output logic [W-1:0] out_a [NC],
  output logic [W-1:0] out_b [NC]
);

  function automatic logic [W-1:0] combine(input rd_op_e op,
                                           input logic [W-1:0] x,
                                           input logic [W-1:0] y);
    unique case (op)
      RD_SUM:  return x + y;
      RD_MIN:  return (x < y) ? x : y;
      RD_MAX:  return (x > y) ? x : y;
      default: return x;
    endcase
  endfunction

  // Stage s holds what the PEs at slot s have received: s = 0 the bottom
  // PEs, s = K the spare slot (results).
  logic         vld [K+1];
  rd_op_e       op  [K+1];
  logic [W-1:0] va  [K+1][NC];   // set A, arrived over B (or entered)
  logic [W-1:0] vb  [K+1][NC];   // set B, arrived over D (or entered)

  // what each dimensional PE sends up after its L exchange
  logic [W-1:0] f_out [K][NC];
  logic [W-1:0] u_out [K][NC];

  for (genvar p = 0; p < K; p++) begin : g_dim
    for (genvar c = 0; c < NC; c++) begin : g_cyc
      // L exchange with the partner cycle, then combine
      assign f_out[p][c] = combine(op[p], va[p][c], va[p][c ^ (1 << p)]);
      assign u_out[p][c] = combine(op[p], vb[p][c], vb[p][c ^ (1 << p)]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= K; s++) begin
        vld[s] <= 1'b0;
        op[s]  <= RD_SUM;
        for (int c = 0; c < NC; c++) begin
          va[s][c] <= '0;
          vb[s][c] <= '0;
        end
      end
    end else begin
      vld[0] <= in_valid;
      op[0]  <= in_op;
      for (int c = 0; c < NC; c++) begin
        va[0][c] <= in_a[c];
        vb[0][c] <= in_b[c];
      end
      for (int p = 0; p < K; p++) begin
        vld[p+1] <= vld[p];
        op[p+1]  <= op[p];
        for (int c = 0; c < NC; c++) begin
          va[p+1][c] <= f_out[p][c];                 // F of PE(c, p) -> B
          vb[p+1][c] <= u_out[p][c ^ (1 << p)];      // U of PE(c^2^p, p) -> D
        end
      end
    end
  end

  assign out_valid = vld[K];
  assign out_op    = op[K];
  assign out_a     = va[K];
  assign out_b     = vb[K];

endmodule
