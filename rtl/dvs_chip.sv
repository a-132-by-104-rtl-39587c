// dvs_chip: the dynamic vision sensor with synchronous address-event
// (SAER) readout and pixel-parallel noise / spatial redundancy suppression.
//
// Operation per event frame:
//  * SAMPLE (one cycle) freezes the comparator state of every pixel into its
//    Event Memory; the GSCL of each 2x2 group decides PASS (AL2/AM3) and the
//    passing groups raise their group-row request YREQ.
//  * The Y scan chain, clocked by YCLK, visits the requesting group rows in
//    order. While a row is serviced, each group column's CSCL filters the
//    group of that row per polarity and raises XREQ; the X scan chain,
//    clocked by XCLK, visits the requesting columns. Rows and columns
//    without a request are skipped inside one clock.
//  * RESTART restarts every pixel whose Event Memory is non-empty.
//
// Chip output bus, combinational from the scan chain registers:
//  * bus_is_y=1, bus_addr=row+1       : first cycle after a YCLK, group row
//  * bus_is_y=1, bus_addr=NGY+1 (YEND): the whole event frame was read
//  * bus_is_y=0, bus_addr=col+1       : one group, its 8 event bits on bus_ev
//  * bus_is_y=0, bus_addr=NGX+1 (XEND): the row is complete
//  * all zero                         : authorization travelling on skip paths
// The X chain is cleared by YCLK and by SAMPLE, and starts as soon as a
// group row is serviced. With XCLK running continuously and YCLK given one
// cycle after XEND is seen, a row of n serviced groups takes n+3 clocks
// (row address, n groups, XEND, one idle cycle): at most 4 events per
// clock, at least 4 clocks per row.
// The one-cycle row-address marker bus_is_y and the 1-based addresses are
// this design's choices; XCLK/YCLK are enables of the single clock clk.
module dvs_chip
  import dvs_pkg::*;
#(
  parameter int unsigned NCOLS  = NCOLS_DEFAULT,
  parameter int unsigned NROWS  = NROWS_DEFAULT,
  parameter int unsigned LOGI_W = 8,
  localparam int unsigned NGX   = NCOLS / GROUP_W,
  localparam int unsigned NGY   = NROWS / GROUP_H,
  localparam int unsigned ADDR_W = $clog2(((NGX > NGY) ? NGX : NGY) + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LOGI_W-1:0] log_i [NROWS][NCOLS],
  input  logic [LOGI_W-1:0] th_on,
  input  logic [LOGI_W-1:0] th_off,
  input  filter_cfg_t       cfg,
  input  logic              sample,
  input  logic              restart,
  input  logic              xclk_en,
  input  logic              yclk_en,
  output logic [ADDR_W-1:0] bus_addr,
  output logic              bus_is_y,
  output group_events_t     bus_ev
);

  logic [NGY-1:0]    yreq, ysrv;
  logic              yend;
  logic [ADDR_W-1:0] yaddr;
  logic [NGX-1:0]    xreq, xsrv;
  logic              xend;
  logic [ADDR_W-1:0] xaddr;
  group_events_t     col_ev [NGX];
  group_events_t     flt_ev [NGX];
  group_events_t     sel_ev;
  logic              y_fresh;

  pixel_array #(.NCOLS(NCOLS), .NROWS(NROWS), .LOGI_W(LOGI_W)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .log_i   (log_i),
    .th_on   (th_on),
    .th_off  (th_off),
    .sample  (sample),
    .restart (restart),
    .al2_en  (cfg.gscl_al2),
    .am3_en  (cfg.gscl_am3),
    .row_sel (ysrv),
    .yreq    (yreq),
    .col_ev  (col_ev)
  );

  for (genvar gx = 0; gx < NGX; gx++) begin : g_cscl
    cscl u_cscl (
      .ev_in  (col_ev[gx]),
      .al2_en (cfg.cscl_al2),
      .am3_en (cfg.cscl_am3),
      .ev_out (flt_ev[gx]),
      .xreq   (xreq[gx])
    );
  end

  scan_chain #(.N(NGY), .ADDR_W(ADDR_W)) u_ychain (
    .clk         (clk),
    .rst_n       (rst_n),
    .clk_en      (yclk_en),
    .clr         (sample),
    .start       (1'b1),
    .req         (yreq),
    .service     (ysrv),
    .end_service (yend),
    .addr        (yaddr)
  );

  scan_chain #(.N(NGX), .ADDR_W(ADDR_W)) u_xchain (
    .clk         (clk),
    .rst_n       (rst_n),
    .clk_en      (xclk_en),
    .clr         (sample | yclk_en),
    .start       (|ysrv),
    .req         (xreq),
    .service     (xsrv),
    .end_service (xend),
    .addr        (xaddr)
  );

  // Marks the first cycle after a YCLK, when the row address is shown.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_fresh <= 1'b0;
    else        y_fresh <= yclk_en & ~sample;
  end

  always_comb begin
    sel_ev = '0;
    for (int gx = 0; gx < NGX; gx++)
      if (xsrv[gx]) sel_ev = sel_ev | flt_ev[gx];
  end

  always_comb begin
    bus_addr = '0;
    bus_is_y = 1'b0;
    bus_ev   = '0;
    if (xsrv != '0 || xend) begin
      bus_addr = xaddr;
      bus_ev   = sel_ev;
    end else if (y_fresh && (ysrv != '0 || yend)) begin
      bus_addr = yaddr;
      bus_is_y = 1'b1;
    end
  end

  // At most one row and one column are serviced at any time.
  a_one_row : assert property (@(posedge clk) disable iff (!rst_n) $onehot0({ysrv, yend}));
  a_one_col : assert property (@(posedge clk) disable iff (!rst_n) $onehot0({xsrv, xend}));

endmodule
