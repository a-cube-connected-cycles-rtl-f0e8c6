// tb_scp_switch: checks every state of the SCP control switch with random
// words. The expected pairing is written as a table of "which terminal is
// joined to which" per state (terminal order a_lo, b_lo, a_hi, b_hi), and each
// output must equal the input of its joined terminal, or 0 when unjoined.
module tb_scp_switch;
  import xccc_pkg::*;
  localparam int W = 16;

  scp_state_e state;
  logic [W-1:0] in_v [4];
  logic [W-1:0] out_v[4];
  int checks = 0, failures = 0;

  scp_switch #(.W(W)) dut (
    .state,
    .a_lo_in(in_v[0]), .b_lo_in(in_v[1]), .a_hi_in(in_v[2]), .b_hi_in(in_v[3]),
    .a_lo_out(out_v[0]), .b_lo_out(out_v[1]), .a_hi_out(out_v[2]), .b_hi_out(out_v[3])
  );

  // joined terminal per state, -1 for none
  function automatic int peer(scp_state_e s, int t);
    int x_tab [4] = '{3, 2, 1, 0};
    int v_tab [4] = '{1, 0, 3, 2};
    int u_tab [4] = '{2, 3, 0, 1};
    case (s)
      SCP_X:   return x_tab[t];
      SCP_V:   return v_tab[t];
      SCP_SUP: return u_tab[t];
      default: return -1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      state = scp_state_e'(it % 4);
      for (int t = 0; t < 4; t++) in_v[t] = W'($urandom);
      #1;
      for (int t = 0; t < 4; t++) begin
        logic [W-1:0] exp_v;
        int pr;
        pr = peer(state, t);
        exp_v = (pr < 0) ? '0 : in_v[pr];
        checks++;
        if (out_v[t] !== exp_v) begin
          failures++;
          $display("FAIL state=%s terminal %0d: got %h expected %h", state.name(), t, out_v[t], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
