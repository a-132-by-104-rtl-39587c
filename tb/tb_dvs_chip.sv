// tb_dvs_chip: the sensor chip at a reduced 12x8 size (6x4 groups), driven
// the way the readout host drives it: SAMPLE, one YCLK, then XCLK every
// clock and a YCLK in the clock after each XEND. Every non-zero bus word is
// compared, in order, with the reference model (group filter, column
// filter, scan order, addresses), the idle cycle after each XEND is
// checked to be zero, and the frame length is checked to be exactly
// 2 + sum(n+3) clocks over the serviced group rows.
module tb_dvs_chip;
  import dvs_pkg::*;
  import tb_dvs_ref_pkg::*;
  localparam int NC = 12, NR = 8, NGX = NC / 2, NGY = NR / 2;
  localparam int AW = $clog2(((NGX > NGY) ? NGX : NGY) + 2);
  logic clk = 0, rst_n = 0;
  logic [7:0] log_i [NR][NC];
  logic [7:0] th_on = 8'd10, th_off = 8'd10;
  filter_cfg_t cfg = '0;
  logic sample = 0, restart = 0, xclk_en = 0, yclk_en = 0;
  logic [AW-1:0] bus_addr;
  logic bus_is_y;
  group_events_t bus_ev;
  int checks = 0, failures = 0;
  dvs_ref #(NC, NR) m;

  dvs_chip #(.NCOLS(NC), .NROWS(NR), .LOGI_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_word_t q[$];
    int exp_clocks;
    m = new();
    foreach (log_i[y, x]) log_i[y][x] = 8'd128;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 300; f++) begin
      int cyc, k;
      bit done;
      @(negedge clk);
      cfg = filter_cfg_t'($urandom);
      m.cfg = cfg;
      m.randomize_frame(1 + f % 5);
      if (f == 0) foreach (m.pol[y, x]) m.pol[y][x] = 0;   // empty frame
      foreach (log_i[y, x]) log_i[y][x] = 8'(m.level(y, x));
      m.expect_frame(q, exp_clocks);
      repeat (2) @(negedge clk);
      sample = 1; @(negedge clk); sample = 0;      // cycle 0
      yclk_en = 1; @(negedge clk); yclk_en = 0;    // cycle 1
      xclk_en = 1;
      cyc = 2; k = 0; done = 0;
      while (!done && cyc < 1000) begin
        // the host reacts to XEND one clock later
        if (bus_addr != '0) begin
          checks++;
          if (k >= q.size() || bus_is_y != q[k].is_y || int'(bus_addr) != q[k].addr || bus_ev != q[k].ev) begin
            failures++;
            $display("f%0d cyc %0d: bus y=%b a=%0d ev=%h, exp y=%b a=%0d ev=%h", f, cyc, bus_is_y, bus_addr,
                     bus_ev, (k < q.size()) ? q[k].is_y : 1'b0, (k < q.size()) ? q[k].addr : -1,
                     (k < q.size()) ? q[k].ev : 8'h0);
          end
          if (bus_is_y && int'(bus_addr) == NGY + 1) begin
            done = 1;
            checks++;
            if (cyc != exp_clocks) begin failures++; $display("f%0d frame %0d clocks, exp %0d", f, cyc, exp_clocks); end
          end
          k++;
        end
        if (!bus_is_y && int'(bus_addr) == NGX + 1) begin
          @(negedge clk); cyc++;
          checks++;
          if (bus_addr != '0) begin failures++; $display("f%0d idle cycle not zero", f); end
          yclk_en = 1; @(negedge clk); yclk_en = 0; cyc++;
        end else begin
          @(negedge clk); cyc++;
        end
      end
      checks++;
      if (!done || k != q.size()) begin failures++; $display("f%0d saw %0d of %0d words", f, k, q.size()); end
      xclk_en = 0;
      restart = 1; @(negedge clk); restart = 0;
      m.restarted();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
