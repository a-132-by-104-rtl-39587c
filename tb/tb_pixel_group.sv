// tb_pixel_group: random event frames on one 2x2 group. Each frame the
// testbench moves the intensity of chosen pixels past the ON or OFF
// threshold, issues SAMPLE, checks the group's events, PASS and request
// against its own AL2/AM3 evaluation, then RESTARTs. Because restarted
// pixels memorise the new level, a pixel only fires again when moved again.
module tb_pixel_group;
  import dvs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] log_i [4];
  logic [7:0] th_on = 8'd10, th_off = 8'd10;
  logic sample = 0, restart = 0, al2 = 0, am3 = 0;
  group_events_t ev;
  logic req, pass;
  int checks = 0, failures = 0, n_drop = 0;
  int ref_lvl [4];

  pixel_group #(.LOGI_W(8)) dut (.clk, .rst_n, .log_i, .th_on, .th_off, .sample,
    .restart, .al2_en(al2), .am3_en(am3), .ev, .req, .pass);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) begin log_i[p] = 8'd128; ref_lvl[p] = 128; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 500; f++) begin
      logic [3:0] e_on, e_off;
      int n;
      bit e_pass;
      @(negedge clk);
      {al2, am3} = 2'($urandom);
      e_on = '0; e_off = '0;
      for (int p = 0; p < 4; p++) begin
        int c;
        c = int'($urandom % 3);
        // keep the levels inside the 8-bit range
        if (c == 1 && ref_lvl[p] > 200) c = 2;
        if (c == 2 && ref_lvl[p] < 50) c = 1;
        case (c)
          0: log_i[p] = 8'(ref_lvl[p]);
          1: begin log_i[p] = 8'(ref_lvl[p] + 15); e_on[p] = 1; end
          default: begin log_i[p] = 8'(ref_lvl[p] - 15); e_off[p] = 1; end
        endcase
      end
      repeat (2) @(negedge clk);
      sample = 1; @(negedge clk); sample = 0;
      n = $countones(e_on | e_off);
      e_pass = !((al2 && n < 2) || (am3 && n > 3));
      if (!e_pass) n_drop++;
      checks += 3;
      if (pass !== e_pass) begin failures++; $display("f%0d pass %b exp %b", f, pass, e_pass); end
      if (req !== (e_pass && n > 0)) begin failures++; $display("f%0d req", f); end
      if (ev !== (e_pass ? {e_on, e_off} : 8'h00)) begin failures++; $display("f%0d ev %h exp %h", f, ev, {e_on, e_off}); end
      restart = 1; @(negedge clk); restart = 0;
      for (int p = 0; p < 4; p++) if (e_on[p] | e_off[p]) ref_lvl[p] = int'(log_i[p]);
      checks++;
      if (req || ev != '0) begin failures++; $display("f%0d not cleared by restart", f); end
    end
    checks++;
    if (n_drop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
