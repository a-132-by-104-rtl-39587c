// tb_cscl: exhaustive check of the column correlation logic: every legal
// group content (each pixel empty, ON or OFF) under every AL2/AM3 setting.
module tb_cscl;
  import dvs_pkg::*;
  group_events_t ev_in, ev_out;
  logic al2, am3, xreq;
  int checks = 0, failures = 0;

  cscl dut (.ev_in(ev_in), .al2_en(al2), .am3_en(am3), .ev_out(ev_out), .xreq(xreq));

  function automatic bit keep(int n, bit a, bit b);
    return !((a && n < 2) || (b && n > 3));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      for (int code = 0; code < 81; code++) begin
        int k, non, noff;
        logic [3:0] on, off;
        group_events_t exp;
        {al2, am3} = c[1:0];
        k = code; on = '0; off = '0;
        for (int p = 0; p < 4; p++) begin
          if (k % 3 == 1) on[p] = 1'b1;
          if (k % 3 == 2) off[p] = 1'b1;
          k = k / 3;
        end
        ev_in.on = on; ev_in.off = off;
        #1;
        non = $countones(on); noff = $countones(off);
        exp.on  = keep(non, al2, am3)  ? on  : 4'b0;
        exp.off = keep(noff, al2, am3) ? off : 4'b0;
        checks += 2;
        if (ev_out !== exp) begin failures++; $display("ev in=%h out=%h exp=%h cfg=%0d", ev_in, ev_out, exp, c); end
        if (xreq !== (exp != '0)) begin failures++; $display("xreq in=%h", ev_in); end
      end
    end
    // AM3 can only act per polarity: four ON events are dropped.
    {al2, am3} = 2'b01; ev_in.on = 4'hF; ev_in.off = 4'h0; #1;
    checks++; if (ev_out != '0 || xreq) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
