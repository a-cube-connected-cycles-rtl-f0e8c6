// tb_pe_bypass: checks the four PE switches in the normal and isolated
// settings. Normal: the PE core exchanges words with the F, B and lateral
// sides. Isolated: the core sees nothing, its outputs are cut off, and the
// words of the two cycle neighbours pass straight between B and F.
module tb_pe_bypass;
  localparam int W = 16;
  logic iso;
  logic [W-1:0] pe_f_out, pe_b_out, pe_l_out, pe_f_in, pe_b_in, pe_l_in;
  logic [W-1:0] up_in, dn_in, up_byp_in, dn_byp_in, up_out, dn_out, up_direct, dn_direct;
  logic [W-1:0] l_in, l_out;
  int checks = 0, failures = 0;

  pe_bypass #(.W(W)) dut (.*);

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s iso=%0b: got %h expected %h", what, iso, got, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 100; it++) begin
      iso = it[0];
      {pe_f_out, pe_b_out, pe_l_out} = {W'($urandom), W'($urandom), W'($urandom)};
      {up_in, dn_in, up_byp_in, dn_byp_in, l_in} =
        {W'($urandom), W'($urandom), W'($urandom), W'($urandom), W'($urandom)};
      #1;
      if (!iso) begin
        chk("up_out", up_out, pe_f_out);
        chk("dn_out", dn_out, pe_b_out);
        chk("pe_f_in", pe_f_in, dn_in);
        chk("pe_b_in", pe_b_in, up_in);
        chk("pe_l_in", pe_l_in, l_in);
        chk("l_out", l_out, pe_l_out);
        chk("up_direct", up_direct, pe_f_out);
        chk("dn_direct", dn_direct, pe_b_out);
      end else begin
        chk("up_out", up_out, up_byp_in);
        chk("dn_out", dn_out, dn_byp_in);
        chk("pe_f_in", pe_f_in, '0);
        chk("pe_b_in", pe_b_in, '0);
        chk("pe_l_in", pe_l_in, '0);
        chk("l_out", l_out, '0);
        chk("up_direct", up_direct, '0);
        chk("dn_direct", dn_direct, '0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
