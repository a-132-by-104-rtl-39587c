// tb_gscl: exhaustive check of the group correlation logic: every Event
// Memory pattern of the 2x2 group under every AL2/AM3 setting, compared
// with a count of the set bits done here.
module tb_gscl;
  logic [3:0] me;
  logic al2, am3, pass, req;
  int checks = 0, failures = 0;

  gscl dut (.me(me), .al2_en(al2), .am3_en(am3), .pass(pass), .req(req));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      for (int m = 0; m < 16; m++) begin
        int n;
        logic exp_pass;
        {al2, am3} = c[1:0];
        me = m[3:0];
        #1;
        n = $countones(m[3:0]);
        exp_pass = 1'b1;
        if (al2 && n < 2) exp_pass = 1'b0;
        if (am3 && n == 4) exp_pass = 1'b0;
        checks += 2;
        if (pass !== exp_pass) begin failures++; $display("pass me=%b al2=%b am3=%b got %b", me, al2, am3, pass); end
        if (req !== (exp_pass && n > 0)) begin failures++; $display("req me=%b got %b", me, req); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
