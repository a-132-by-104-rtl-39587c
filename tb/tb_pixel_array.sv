// tb_pixel_array: a reduced 8x6 pixel array (4x3 groups). Random event
// frames are created, sampled, and for every one-hot row selection the
// group-row requests and the column lines are compared with a model that
// applies the GSCL rule to each group.
module tb_pixel_array;
  import dvs_pkg::*;
  localparam int NC = 8, NR = 6, NGX = NC / 2, NGY = NR / 2;
  logic clk = 0, rst_n = 0;
  logic [7:0] log_i [NR][NC];
  logic [7:0] th_on = 8'd10, th_off = 8'd10;
  logic sample = 0, restart = 0, al2 = 0, am3 = 0;
  logic [NGY-1:0] row_sel = '0, yreq;
  group_events_t col_ev [NGX];
  int checks = 0, failures = 0;
  int ref_lvl [NR][NC];
  int pol [NR][NC];  // 0 none, 1 on, 2 off

  pixel_array #(.NCOLS(NC), .NROWS(NR), .LOGI_W(8)) dut (.clk, .rst_n, .log_i, .th_on,
    .th_off, .sample, .restart, .al2_en(al2), .am3_en(am3), .row_sel, .yreq, .col_ev);

  always #5 clk = ~clk;

  function automatic group_events_t exp_group(int gy, int gx);
    group_events_t g;
    int n;
    g = '0; n = 0;
    for (int p = 0; p < 4; p++) begin
      int y, x;
      y = 2 * gy + p / 2; x = 2 * gx + p % 2;
      if (pol[y][x] == 1) g.on[p] = 1;
      if (pol[y][x] == 2) g.off[p] = 1;
      if (pol[y][x] != 0) n++;
    end
    if ((al2 && n < 2) || (am3 && n > 3)) g = '0;
    return g;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < NR; y++) for (int x = 0; x < NC; x++) begin log_i[y][x] = 8'd128; ref_lvl[y][x] = 128; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 200; f++) begin
      @(negedge clk);
      {al2, am3} = 2'($urandom);
      for (int y = 0; y < NR; y++) for (int x = 0; x < NC; x++) begin
        pol[y][x] = (f % 4 == 3) ? 1 : int'($urandom % 3);
        if ($urandom % 2 == 0 && f % 4 != 3) pol[y][x] = 0;
        // keep the levels inside the 8-bit range
        if (pol[y][x] == 1 && ref_lvl[y][x] > 200) pol[y][x] = 2;
        if (pol[y][x] == 2 && ref_lvl[y][x] < 50) pol[y][x] = 1;
        log_i[y][x] = 8'(ref_lvl[y][x] + (pol[y][x] == 1 ? 15 : pol[y][x] == 2 ? -15 : 0));
      end
      repeat (2) @(negedge clk);
      sample = 1; @(negedge clk); sample = 0;
      for (int gy = 0; gy < NGY; gy++) begin
        bit r;
        r = 0;
        for (int gx = 0; gx < NGX; gx++) if (exp_group(gy, gx) != '0) r = 1;
        checks++;
        if (yreq[gy] !== r) begin failures++; $display("f%0d yreq[%0d]=%b exp %b", f, gy, yreq[gy], r); end
        row_sel = '0; row_sel[gy] = 1'b1; #1;
        for (int gx = 0; gx < NGX; gx++) begin
          checks++;
          if (col_ev[gx] !== exp_group(gy, gx)) begin
            failures++; $display("f%0d g(%0d,%0d) %h exp %h", f, gy, gx, col_ev[gx], exp_group(gy, gx));
          end
        end
      end
      row_sel = '0; #1;
      checks++;
      for (int gx = 0; gx < NGX; gx++) if (col_ev[gx] != '0) begin failures++; break; end
      @(negedge clk);
      restart = 1; @(negedge clk); restart = 0;
      for (int y = 0; y < NR; y++) for (int x = 0; x < NC; x++)
        if (pol[y][x] != 0) ref_lvl[y][x] = int'(log_i[y][x]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
