// tb_pe_port_steer: drives every combination of the routing controls with
// random words and compares each physical and logical output with the port
// the routing rules say it must be connected to.
module tb_pe_port_steer;
  import xccc_pkg::*;
  localparam int W = 16;
  logic perf, f_via_u, b_via_d;
  lat_route_e lat_route;
  logic [W-1:0] log_f_out, log_b_out, log_l_out, x_u_out, x_d_out;
  logic [W-1:0] log_f_in, log_b_in, log_l_in, x_u_in, x_d_in;
  logic [W-1:0] phy_f_out, phy_b_out, phy_l_out, phy_u_out, phy_d_out;
  logic [W-1:0] phy_f_in, phy_b_in, phy_l_in, phy_u_in, phy_d_in;
  int checks = 0, failures = 0;

  pe_port_steer #(.W(W)) dut (.*);

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s perf=%0b fu=%0b bd=%0b lat=%s: got %h expected %h",
               what, perf, f_via_u, b_via_d, lat_route.name(), got, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 64 * 4; it++) begin
      {perf, f_via_u, b_via_d} = 3'(it % 8);
      lat_route = lat_route_e'((it / 8) % 4);
      {log_f_out, log_b_out, log_l_out, x_u_out, x_d_out} =
        {W'($urandom), W'($urandom), W'($urandom), W'($urandom), W'($urandom)};
      {phy_f_in, phy_b_in, phy_l_in, phy_u_in, phy_d_in} =
        {W'($urandom), W'($urandom), W'($urandom), W'($urandom), W'($urandom)};
      #1;
      if (perf) begin
        chk("phy_u_out", phy_u_out, x_u_out);
        chk("phy_d_out", phy_d_out, x_d_out);
        chk("x_u_in", x_u_in, phy_u_in);
        chk("x_d_in", x_d_in, phy_d_in);
        chk("log_f_in", log_f_in, phy_f_in);
        chk("log_b_in", log_b_in, phy_b_in);
      end else begin
        chk("x_u_in", x_u_in, '0);
        chk("x_d_in", x_d_in, '0);
        chk("log_f_in", log_f_in, f_via_u ? phy_u_in : phy_f_in);
        chk("log_b_in", log_b_in, b_via_d ? phy_d_in : phy_b_in);
        chk("phy_u_out", phy_u_out, f_via_u ? log_f_out :
                                    (lat_route == VIA_U) ? log_l_out : '0);
        chk("phy_d_out", phy_d_out, b_via_d ? log_b_out :
                                    (lat_route == VIA_D) ? log_l_out : '0);
        chk("log_l_in", log_l_in, (lat_route == VIA_L) ? phy_l_in :
                                  (lat_route == VIA_U) ? phy_u_in :
                                  (lat_route == VIA_D) ? phy_d_in : '0);
      end
      chk("phy_f_out", phy_f_out, f_via_u ? '0 : log_f_out);
      chk("phy_b_out", phy_b_out, b_via_d ? '0 : log_b_out);
      chk("phy_l_out", phy_l_out, (lat_route == VIA_L) ? log_l_out : '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
