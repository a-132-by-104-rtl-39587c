// dvs_top: the complete event camera: the dvs_chip sensor and the
// host_sequencer that drives it.
//
// The host samples an event frame every frame_period clocks, reads it out
// through the chip's synchronous address-event bus and restarts the pixels
// that held an event. Each read group (2x2 pixels) appears on ev_valid with
// its group column ev_gx, group row ev_gy and the 8 ON/OFF bits ev; pixel
// p of the group (p = 2*row_in_group + col_in_group) lies at column
// 2*ev_gx + p%2 and row 2*ev_gy + p/2. The raw chip bus is also brought out.
// cfg selects the AL2/AM3 filters of the group (GSCL) and column (CSCL)
// stages. log_i, th_on and th_off drive the behavioural pixel front ends.
module dvs_top
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
  input  logic              enable,
  input  logic [31:0]       frame_period,
  input  filter_cfg_t       cfg,
  input  logic [LOGI_W-1:0] th_on,
  input  logic [LOGI_W-1:0] th_off,
  input  logic [LOGI_W-1:0] log_i [NROWS][NCOLS],
  output logic              ev_valid,
  output logic [ADDR_W-1:0] ev_gx,
  output logic [ADDR_W-1:0] ev_gy,
  output group_events_t     ev,
  output logic              frame_done,
  output logic [31:0]       frame_clocks,
  output logic              sample,
  output logic              restart,
  output logic              xclk_en,
  output logic              yclk_en,
  output logic [ADDR_W-1:0] bus_addr,
  output logic              bus_is_y,
  output group_events_t     bus_ev
);

  dvs_chip #(.NCOLS(NCOLS), .NROWS(NROWS), .LOGI_W(LOGI_W)) u_chip (
    .clk      (clk),
    .rst_n    (rst_n),
    .log_i    (log_i),
    .th_on    (th_on),
    .th_off   (th_off),
    .cfg      (cfg),
    .sample   (sample),
    .restart  (restart),
    .xclk_en  (xclk_en),
    .yclk_en  (yclk_en),
    .bus_addr (bus_addr),
    .bus_is_y (bus_is_y),
    .bus_ev   (bus_ev)
  );

  host_sequencer #(.NGX(NGX), .NGY(NGY), .ADDR_W(ADDR_W)) u_host (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable       (enable),
    .frame_period (frame_period),
    .sample       (sample),
    .restart      (restart),
    .xclk_en      (xclk_en),
    .yclk_en      (yclk_en),
    .bus_addr     (bus_addr),
    .bus_is_y     (bus_is_y),
    .bus_ev       (bus_ev),
    .ev_valid     (ev_valid),
    .ev_gx        (ev_gx),
    .ev_gy        (ev_gy),
    .ev           (ev),
    .frame_done   (frame_done),
    .frame_clocks (frame_clocks)
  );

endmodule
