// tb_host_sequencer: the readout host against a small behavioural stand-in
// for the sensor bus (4 group rows, 6 group columns). The stand-in shows a
// row address in the clock after each YCLK, then the programmed groups, then
// XEND, then zeros; or YEND once the programmed rows are used up. Checks:
// decoded group events and their row/column, YCLK exactly one clock after
// XEND is on the bus, XCLK during readout, RESTART after YEND, the SAMPLE
// spacing (frame_period when the readout is short, RESTART+1 when it is
// long) and the reported frame length.
module tb_host_sequencer;
  import dvs_pkg::*;
  localparam int NGX = 6, NGY = 4;
  localparam int AW = $clog2(NGX + 2);
  logic clk = 0, rst_n = 0, enable = 0;
  logic [31:0] frame_period = 32'd60;
  logic sample, restart, xclk_en, yclk_en;
  logic [AW-1:0] bus_addr = '0;
  logic bus_is_y = 0;
  group_events_t bus_ev = '0;
  logic ev_valid;
  logic [AW-1:0] ev_gx, ev_gy;
  group_events_t ev;
  logic frame_done;
  logic [31:0] frame_clocks;
  int checks = 0, failures = 0;

  // programmed frame: rows[r] lists the groups (column) of row r; ev = col*16+row+1
  int rows [$];
  int cols [NGY][$];
  int exp_ev [$];     // expected decoded: row*256 + col
  int got_ev [$];
  int last_sample = -1, cyc = 0, n_long = 0, n_short = 0, n_frames = 0, exp_len = 0;
  int xend_cycle = -100;
  int per = 0;
  int last_len = 1 << 30;  // length of the last finished readout  // frame_period read by the host at the last SAMPLE

  host_sequencer #(.NGX(NGX), .NGY(NGY)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic program_frame();
    rows.delete(); exp_ev.delete(); got_ev.delete();
    exp_len = 2;
    for (int r = 0; r < NGY; r++) begin
      cols[r].delete();
      if ($urandom % 3 != 0) begin
        rows.push_back(r);
        for (int c = 0; c < NGX; c++) if ($urandom % 2) begin cols[r].push_back(c); exp_ev.push_back(r * 256 + c); end
        exp_len += cols[r].size() + 3;
      end
    end
  endtask

  // Behavioural bus of the sensor.
  initial begin : chip
    int ri;
    forever begin
      @(posedge clk);
      if (sample) ri = 0;
      if (yclk_en) begin
        @(negedge clk);
        if (ri < rows.size()) begin
          int r;
          r = rows[ri]; ri++;
          bus_is_y = 1; bus_addr = AW'(r + 1);
          @(negedge clk); bus_is_y = 0; bus_addr = '0;
          foreach (cols[r][k]) begin
            bus_addr = AW'(cols[r][k] + 1); bus_ev = 8'(cols[r][k] * 16 + r + 1);
            @(negedge clk);
          end
          bus_ev = '0; bus_addr = AW'(NGX + 1); xend_cycle = cyc;
          @(negedge clk); bus_addr = '0;
        end else begin
          bus_is_y = 1; bus_addr = AW'(NGY + 1);
          @(negedge clk); bus_is_y = 0; bus_addr = '0;
        end
      end
    end
  end

  // Monitor: decoded events, YCLK timing, XCLK, SAMPLE spacing.
  always @(negedge clk) if (rst_n) begin
    if (frame_done) last_len = int'(frame_clocks);
    if (ev_valid) begin
      got_ev.push_back(int'(ev_gy) * 256 + int'(ev_gx));
      checks++;
      if (ev !== 8'(int'(ev_gx) * 16 + int'(ev_gy) + 1)) begin failures++; $display("ev bits %h at (%0d,%0d)", ev, ev_gx, ev_gy); end
    end
    if (yclk_en && cyc > last_sample + 2) begin
      checks++;
      if (cyc != xend_cycle + 1) begin failures++; $display("yclk at %0d, xend at %0d", cyc, xend_cycle); end
    end
    if (sample) begin
      if (last_sample >= 0) begin
        checks++;
        if (cyc - last_sample == per) n_short++;
        else n_long++;
        // a frame whose readout ends well before the period must wait for it exactly
        if (per > last_len + 6 && cyc - last_sample != per) begin
          failures++; $display("SAMPLE spacing %0d, period %0d", cyc - last_sample, per);
        end
        if (cyc - last_sample < per) begin failures++; $display("SAMPLE too early: %0d after, period %0d now %0d", cyc - last_sample, per, frame_period); end
      end
      last_sample = cyc;
      // every third frame gets a period shorter than its readout
      frame_period = (n_frames % 3 == 2) ? 32'd5 : 32'd60;
      per = int'(frame_period);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    program_frame();
    @(negedge clk); enable = 1;
    for (int f = 0; f < 60; f++) begin
      @(posedge frame_done);
      @(negedge clk);
      n_frames++;
      checks += 2;
      if (got_ev != exp_ev) begin failures++; $display("frame %0d events %p exp %p", f, got_ev, exp_ev); end
      if (int'(frame_clocks) != exp_len) begin failures++; $display("frame %0d length %0d exp %0d", f, frame_clocks, exp_len); end
      // the next frame's content is programmed before its SAMPLE
      program_frame();
    end
    checks += 2;
    if (n_short == 0) begin failures++; $display("no frame-rate-limited frame"); end
    if (n_long == 0) begin failures++; $display("no readout-limited frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
