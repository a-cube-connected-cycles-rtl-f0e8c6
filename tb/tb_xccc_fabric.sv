// tb_xccc_fabric: drives every physical output port of XCCC(5,3) with a word
// that encodes (cycle, slot, port) and checks where each word arrives. The
// expected destination of every input port is computed by a reference model
// in this testbench from the network definition (F of slot q to B of the next
// working slot of the cycle, L of slot q to slot q of cycle c xor 2^q, U/D
// through the SCP pairing of its state). Random isolation patterns (at most
// one isolated slot per cycle), random SCP states and random broken links are
// applied over many rounds.
module tb_xccc_fabric;
  import xccc_pkg::*;
  localparam int W = 16, H = 4, K = 3, NC = 8, NS = 5;

  logic         iso       [NC][NS];
  scp_state_e   scp_state [K][NC];
  logic         fb_dead   [NC][NS];
  logic         l_dead    [NC][NS];
  logic [W-1:0] f_out [NC][NS], b_out [NC][NS], l_out [NC][NS], u_out [NC][NS], d_out [NC][NS];
  logic [W-1:0] f_in  [NC][NS], b_in  [NC][NS], l_in  [NC][NS], u_in  [NC][NS], d_in  [NC][NS];

  int checks = 0, failures = 0;

  xccc_fabric #(.W(W), .H(H), .K(K)) dut (.*);

  localparam int PF = 1, PB = 2, PL = 3, PU = 4, PD = 5;
  function automatic logic [W-1:0] tag(int c, int q, int port);
    return W'((port << 12) | (c << 4) | q);
  endfunction

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  // word arriving at the U (up = 0) or D (up = 1) terminal of (c, q)
  function automatic logic [W-1:0] scp_ref(int c, int q, bit is_d);
    int p, cb, ca;
    scp_state_e s;
    p  = is_d ? q - 1 : q;
    cb = c ^ (1 << p);
    ca = ((c >> p) & 1) ? cb : c;
    s  = scp_state[p][ca];
    case (s)
      SCP_X:   return is_d ? u_out[cb][p] : d_out[cb][p+1];
      SCP_V:   return is_d ? d_out[cb][p+1] : u_out[cb][p];
      SCP_SUP: return is_d ? u_out[c][p] : d_out[c][p+1];
      default: return '0;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 60; round++) begin
      for (int c = 0; c < NC; c++) begin
        int iso_q;
        iso_q = (round == 0) ? K : $urandom_range(0, NS);   // NS: none isolated
        for (int q = 0; q < NS; q++) begin
          iso[c][q]     = (q == iso_q);
          fb_dead[c][q] = (round > 0) && ($urandom_range(0, 9) == 0);
          l_dead[c][q]  = (round > 0) && ($urandom_range(0, 9) == 0);
          f_out[c][q] = tag(c, q, PF); b_out[c][q] = tag(c, q, PB);
          l_out[c][q] = tag(c, q, PL); u_out[c][q] = tag(c, q, PU);
          d_out[c][q] = tag(c, q, PD);
        end
      end
      for (int p = 0; p < K; p++)
        for (int c = 0; c < NC; c++)
          if (((c >> p) & 1) == 0) begin
            scp_state[p][c] = scp_state_e'($urandom_range(0, 3));
            scp_state[p][c ^ (1 << p)] = scp_state[p][c];
          end
      #1;
      for (int c = 0; c < NC; c++) begin
        for (int q = 0; q < NS; q++) begin
          int pr, pr2, su, su2;
          logic [W-1:0] eb, ef, el;
          pr  = (q + NS - 1) % NS;  pr2 = (q + NS - 2) % NS;
          su  = (q + 1) % NS;       su2 = (q + 2) % NS;
          // B input: from the predecessor, or across an isolated predecessor
          if (iso[c][q]) eb = '0;
          else if (fb_dead[c][pr]) eb = '0;
          else if (!iso[c][pr]) eb = f_out[c][pr];
          else eb = (fb_dead[c][pr2] || iso[c][pr2]) ? '0 : f_out[c][pr2];
          if (iso[c][q]) ef = '0;
          else if (fb_dead[c][q]) ef = '0;
          else if (!iso[c][su]) ef = b_out[c][su];
          else ef = (fb_dead[c][su] || iso[c][su2]) ? '0 : b_out[c][su2];
          if (q >= K || iso[c][q] || iso[c ^ (1 << q)][q] || l_dead[c][q] || l_dead[c ^ (1 << q)][q])
            el = '0;
          else el = l_out[c ^ (1 << q)][q];
          chk($sformatf("r%0d b_in(%0d,%0d)", round, c, q), b_in[c][q], eb);
          chk($sformatf("r%0d f_in(%0d,%0d)", round, c, q), f_in[c][q], ef);
          chk($sformatf("r%0d l_in(%0d,%0d)", round, c, q), l_in[c][q], el);
          chk($sformatf("r%0d u_in(%0d,%0d)", round, c, q), u_in[c][q], (q < K) ? scp_ref(c, q, 0) : '0);
          chk($sformatf("r%0d d_in(%0d,%0d)", round, c, q), d_in[c][q],
              (q >= 1 && q <= K) ? scp_ref(c, q, 1) : '0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
