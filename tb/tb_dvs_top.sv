// tb_dvs_top: end-to-end test of dvs_top at a reduced size of 24x16 pixels (12x8 groups).
//
// Each frame the testbench draws a random event pattern and filter setting,
// moves the pixel intensities so that those pixels fire, lets the host
// sample and read the frame, and compares the decoded group events and the
// reported frame length with the reference model. It counts how often
// each mechanism of the design occurs and fails if one never did:
// AL2 and AM3 suppression in the groups, per-polarity suppression in the
// columns, skipped group rows and columns, a serviced row left empty by the
// column filter, an empty frame, a frame-rate-limited frame (waiting for
// the next SAMPLE) and a readout-limited frame (SAMPLE right after
// RESTART). It also measures readout efficiency for a frame of full groups
// in every group (best case, up to 4 events per clock) and for a frame with
// one event per group row (worst case, 4 clocks per row).
module tb_dvs_top;
  import dvs_pkg::*;
  import tb_dvs_ref_pkg::*;
  localparam int NC = 24, NR = 16, NGX = NC / 2, NGY = NR / 2;
  localparam int AW = $clog2(((NGX > NGY) ? NGX : NGY) + 2);
  logic clk = 0, rst_n = 0, enable = 0;
  logic [31:0] frame_period = 32'd300;
  filter_cfg_t cfg = '0;
  logic [7:0] th_on = 8'd10, th_off = 8'd10;
  logic [7:0] log_i [NR][NC];
  logic ev_valid, frame_done, sample, restart, xclk_en, yclk_en, bus_is_y;
  logic [AW-1:0] ev_gx, ev_gy, bus_addr;
  group_events_t ev, bus_ev;
  logic [31:0] frame_clocks;
  int checks = 0, failures = 0;
  dvs_ref #(NC, NR) m;
  bus_word_t q[$];
  int got [$];
  int exp_ev [$];
  int exp_clocks;
  int n_al2 = 0, n_am3 = 0, n_cscl = 0, n_rskip = 0, n_cskip = 0, n_rempty = 0;
  int n_empty = 0, n_rate = 0, n_readout = 0, n_best = 0, n_worst = 0;

  dvs_top #(.NCOLS(NC), .NROWS(NR), .LOGI_W(8)) dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (ev_valid) got.push_back(int'(ev_gy) * 65536 + int'(ev_gx) * 256 + int'(ev));

  task automatic build_expect();
    m.expect_frame(q, exp_clocks);
    exp_ev.delete();
    foreach (q[k]) begin
      if (q[k].is_y && q[k].addr <= NGY) exp_ev.push_back((q[k].addr - 1) * 65536);
      else if (!q[k].is_y && q[k].addr <= NGX) exp_ev[$] = 0;  // placeholder, replaced below
    end
    exp_ev.delete();
    begin
      int row;
      row = 0;
      foreach (q[k]) begin
        if (q[k].is_y) row = q[k].addr - 1;
        else if (q[k].addr <= NGX) exp_ev.push_back(row * 65536 + (q[k].addr - 1) * 256 + int'(q[k].ev));
      end
    end
  endtask

  task automatic check_frame(int f, string kind);
    checks += 2;
    if (got != exp_ev) begin
      failures++;
      $display("frame %0d (%s): %0d groups decoded, %0d expected", f, kind, got.size(), exp_ev.size());
    end
    if (int'(frame_clocks) != exp_clocks) begin
      failures++;
      $display("frame %0d (%s): %0d clocks, expected %0d", f, kind, frame_clocks, exp_clocks);
    end
  endtask

  initial begin
    int n_frames;
    m = new();
    foreach (log_i[y, x]) log_i[y][x] = 8'd128;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    n_frames = 200;
    for (int f = 0; f < n_frames; f++) begin
      string kind;
      // choose the frame
      kind = "random";
      cfg = filter_cfg_t'($urandom);
      m.randomize_frame(1 + f % 4);
      if (f == 1) begin kind = "empty"; foreach (m.pol[y, x]) m.pol[y][x] = 0; end
      if (f == 2) begin   // best case: every group full, no AM3
        kind = "best";
        cfg = '0;
        foreach (m.pol[y, x]) m.pol[y][x] = (m.ref_lvl[y][x] > 200) ? 2 : 1;
      end
      if (f == 3) begin   // worst case: one event per group row
        kind = "worst";
        cfg = '0;
        foreach (m.pol[y, x]) m.pol[y][x] = 0;
        for (int gy = 0; gy < NGY; gy++) m.pol[2 * gy][(gy * 5) % NC] = (m.ref_lvl[2 * gy][(gy * 5) % NC] > 200) ? 2 : 1;
      end
      if (f == 4) begin   // group row 0 passes the group filter but not the column filter
        kind = "column-filtered row";
        cfg = '0; cfg.gscl_al2 = 1'b1; cfg.cscl_al2 = 1'b1;
        for (int x = 0; x < NC; x++) begin
          m.pol[0][x] = (x % 2 == 0) ? 1 : 2;
          m.pol[1][x] = 0;
          if (m.pol[0][x] == 1 && m.ref_lvl[0][x] > 200) m.pol[0][x] = 0;
          if (m.pol[0][x] == 2 && m.ref_lvl[0][x] < 50)  m.pol[0][x] = 0;
        end
        m.pol[0][0] = (m.ref_lvl[0][0] > 200) ? 2 : 1;
        m.pol[0][1] = (m.pol[0][0] == 1) ? ((m.ref_lvl[0][1] < 50) ? 1 : 2) : ((m.ref_lvl[0][1] > 200) ? 2 : 1);
      end
      m.cfg = cfg;
      foreach (log_i[y, x]) log_i[y][x] = 8'(m.level(y, x));
      build_expect();
      n_al2 += m.n_al2_drop; n_am3 += m.n_am3_drop; n_cscl += m.n_cscl_drop;
      n_rskip += m.n_row_skip; n_cskip += m.n_col_skip; n_rempty += m.n_row_empty;
      if (exp_ev.size() == 0) n_empty++;
      // every fourth frame allows less time than its readout needs
      frame_period = (f % 4 == 3) ? 32'd4 : 32'd300;
      if (f == 0) begin @(negedge clk); enable = 1; end
      got.delete();
      @(posedge frame_done);
      @(negedge clk);
      check_frame(f, kind);
      if (kind == "best") begin
        n_best++;
        checks++;
        $display("best case: %0d events in %0d clocks", m.n_events_out, frame_clocks);
        if (m.n_events_out != 4 * NGX * NGY || int'(frame_clocks) != 2 + NGY * (NGX + 3)) failures++;
      end
      if (kind == "worst") begin
        n_worst++;
        checks++;
        $display("worst case: %0d events in %0d clocks", m.n_events_out, frame_clocks);
        if (int'(frame_clocks) != 2 + 4 * NGY) failures++;
      end
      m.restarted();
      if (sample) begin
        // The readout took longer than the period: the next SAMPLE came
        // right after RESTART, before any pixel could fire again.
        n_readout++;
        frame_period = 32'd300;
        foreach (m.pol[y, x]) m.pol[y][x] = 0;
        build_expect();
        got.delete();
        @(posedge frame_done);
        @(negedge clk);
        check_frame(f, "back-to-back");
      end else n_rate++;
    end
    checks += 10;
    if (n_al2 == 0)    begin failures++; $display("AL2 group suppression never happened"); end
    if (n_am3 == 0)    begin failures++; $display("AM3 group suppression never happened"); end
    if (n_cscl == 0)   begin failures++; $display("column suppression never happened"); end
    if (n_rskip == 0)  begin failures++; $display("no group row was skipped"); end
    if (n_cskip == 0)  begin failures++; $display("no group column was skipped"); end
    if (n_rempty == 0) begin failures++; $display("no serviced row was emptied by the column filter"); end
    if (n_empty == 0)  begin failures++; $display("no empty frame"); end
    if (n_rate == 0)   begin failures++; $display("no frame-rate-limited frame"); end
    if (n_readout == 0) begin failures++; $display("no readout-limited frame"); end
    if (n_best == 0 || n_worst == 0) begin failures++; $display("efficiency cases missing"); end
    $display("counts: al2=%0d am3=%0d cscl=%0d row_skip=%0d col_skip=%0d row_empty=%0d empty=%0d rate=%0d readout=%0d",
             n_al2, n_am3, n_cscl, n_rskip, n_cskip, n_rempty, n_empty, n_rate, n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
