// tb_dvs_workloads: the two operating points of the sensor, on a full-width
// 132 x 16 pixel strip (66 x 8 groups) clocked at 50 MHz, filters off.
//
// Low activity: 100 events per frame at 1000 event frames per second
// (frame_period = 50000 clocks). Checks that every event is read in every
// frame, that SAMPLEs are exactly 50000 clocks apart and so that the
// delivered rate is 100 keps.
//
// High activity: every pixel fires in every frame and the frame period is
// the shortest that still lets restarted pixels fire again. Checks that the
// sustained rate, SAMPLE to SAMPLE including RESTART, is at least
// 3.6 events per clock, i.e. 180 Meps at 50 MHz.
module tb_dvs_workloads;
  import dvs_pkg::*;
  localparam int NC = 132, NR = 16, NGX = NC / 2, NGY = NR / 2;
  localparam int AW = $clog2(((NGX > NGY) ? NGX : NGY) + 2);
  localparam int FULL_CLOCKS = 2 + NGY * (NGX + 3);   // readout of a fully active frame
  logic clk = 0, rst_n = 0, enable = 0;
  logic [31:0] frame_period = 32'd50000;
  filter_cfg_t cfg = '0;
  logic [7:0] th_on = 8'd10, th_off = 8'd10;
  logic [7:0] log_i [NR][NC];
  logic ev_valid, frame_done, sample, restart, xclk_en, yclk_en, bus_is_y;
  logic [AW-1:0] ev_gx, ev_gy, bus_addr;
  group_events_t ev, bus_ev;
  logic [31:0] frame_clocks;
  int checks = 0, failures = 0;
  int n_ev = 0, cyc = 0, last_sample = -1, spacing = 0;
  int samples [$];

  dvs_top #(.NCOLS(NC), .NROWS(NR), .LOGI_W(8)) dut (.*);

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (ev_valid) n_ev += $countones({ev.on, ev.off});
    if (sample) begin
      if (last_sample >= 0) spacing = cyc - last_sample;
      last_sample = cyc;
      samples.push_back(cyc);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Flip 'count' distinct random pixels (all pixels if count < 0) between
  // the levels 128 and 143. Every pixel sits at the level it memorised at
  // its last restart, so each flipped pixel fires exactly once.
  task automatic stimulate(int count);
    if (count < 0) foreach (log_i[y, x]) log_i[y][x] = (log_i[y][x] == 8'd128) ? 8'd143 : 8'd128;
    else begin
      bit moved [NR][NC];
      int placed;
      placed = 0;
      foreach (moved[y, x]) moved[y][x] = 0;
      while (placed < count) begin
        int y, x;
        y = int'($urandom % NR); x = int'($urandom % NC);
        if (!moved[y][x]) begin
          moved[y][x] = 1;
          log_i[y][x] = (log_i[y][x] == 8'd128) ? 8'd143 : 8'd128;
          placed++;
        end
      end
    end
  endtask

  initial begin
    foreach (log_i[y, x]) log_i[y][x] = 8'd128;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // ---- low activity: 100 events per frame at 1 kefps ----
    for (int f = 0; f < 3; f++) begin
      stimulate(100);
      if (f == 0) begin @(negedge clk); enable = 1; end
      n_ev = 0;
      @(posedge frame_done); @(negedge clk);
      checks++;
      if (n_ev != 100) begin failures++; $display("low activity frame %0d: %0d events, expected 100", f, n_ev); end
      if (f > 0) begin
        checks++;
        if (spacing != 50000) begin failures++; $display("frame spacing %0d", spacing); end
      end
    end
    $display("low activity: 100 events per %0d clocks = %0d keps at 50 MHz", spacing, 100 * 50000 / spacing);
    // ---- high activity: every pixel, back-to-back frames ----
    // The next SAMPLE must come at least one clock after frame_done, when
    // the testbench moves the pixels: readout + YEND seen + RESTART + 2.
    frame_period = 32'(FULL_CLOCKS + 4);
    begin
      int total, first, cycles;
      real rate;
      total = 0;
      samples.delete();
      for (int f = 0; f < 6; f++) begin
        // after the previous frame's RESTART, move every pixel again
        stimulate(-1);
        n_ev = 0;
        @(posedge frame_done); @(negedge clk);
        checks++;
        if (n_ev != NC * NR) begin failures++; $display("high activity frame %0d: %0d events", f, n_ev); end
        checks++;
        if (sample) begin failures++; $display("SAMPLE came before the pixels could fire again"); end
        if (f >= 1) total += n_ev;
      end
      @(posedge sample); @(negedge clk);
      // frames 1..5: from the SAMPLE of frame 1 to the SAMPLE after frame 5
      first = samples[samples.size() - 6];
      cycles = samples[samples.size() - 1] - first;
      rate = real'(total) / real'(cycles);
      $display("high activity: %0d events in %0d clocks = %0.3f events/clock = %0.1f Meps at 50 MHz",
               total, cycles, rate, rate * 50.0);
      checks++;
      if (rate < 3.6) begin failures++; $display("below 180 Meps"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
