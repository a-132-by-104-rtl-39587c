// pixel_array: the NCOLS x NROWS pixel array built from 2x2 pixel groups.
//
// Every group row raises yreq when any of its groups requests (GSCL PASS
// and a stored event). The Y scan chain selects one group row at a time
// with the one-hot row_sel; the selected row then drives, for every group
// column, the event word of its group onto the column lines col_ev, which
// feed the column filters (CSCL). On the chip these are shared column
// wires; here they are an AND-OR selection over the rows.
//
// log_i[y][x] is the log intensity of the pixel in row y, column x. Group
// (gy, gx) holds pixel rows 2gy..2gy+1 and columns 2gx..2gx+1.
// SAMPLE, RESTART and the GSCL settings are common to the whole array,
// which makes every pixel act synchronously.
module pixel_array
  import dvs_pkg::*;
#(
  parameter int unsigned NCOLS  = NCOLS_DEFAULT,
  parameter int unsigned NROWS  = NROWS_DEFAULT,
  parameter int unsigned LOGI_W = 8,
  localparam int unsigned NGX   = NCOLS / GROUP_W,
  localparam int unsigned NGY   = NROWS / GROUP_H
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LOGI_W-1:0] log_i [NROWS][NCOLS],
  input  logic [LOGI_W-1:0] th_on,
  input  logic [LOGI_W-1:0] th_off,
  input  logic              sample,
  input  logic              restart,
  input  logic              al2_en,
  input  logic              am3_en,
  input  logic [NGY-1:0]    row_sel,   // one-hot group row selection
  output logic [NGY-1:0]    yreq,      // group row requests
  output group_events_t     col_ev [NGX]
);

  group_events_t g_ev [NGY][NGX];
  logic          g_req [NGY][NGX];

  for (genvar gy = 0; gy < NGY; gy++) begin : g_row
    for (genvar gx = 0; gx < NGX; gx++) begin : g_col
      logic [LOGI_W-1:0] li [GROUP_PIX];
      logic              pass_unused;
      assign li[0] = log_i[2*gy][2*gx];
      assign li[1] = log_i[2*gy][2*gx+1];
      assign li[2] = log_i[2*gy+1][2*gx];
      assign li[3] = log_i[2*gy+1][2*gx+1];
      pixel_group #(.LOGI_W(LOGI_W)) u_grp (
        .clk     (clk),
        .rst_n   (rst_n),
        .log_i   (li),
        .th_on   (th_on),
        .th_off  (th_off),
        .sample  (sample),
        .restart (restart),
        .al2_en  (al2_en),
        .am3_en  (am3_en),
        .ev      (g_ev[gy][gx]),
        .req     (g_req[gy][gx]),
        .pass    (pass_unused)
      );
    end
  end

  always_comb begin
    for (int gy = 0; gy < NGY; gy++) begin
      yreq[gy] = 1'b0;
      for (int gx = 0; gx < NGX; gx++) yreq[gy] = yreq[gy] | g_req[gy][gx];
    end
    for (int gx = 0; gx < NGX; gx++) begin
      col_ev[gx] = '0;
      for (int gy = 0; gy < NGY; gy++)
        if (row_sel[gy]) col_ev[gx] = col_ev[gx] | g_ev[gy][gx];
    end
  end

endmodule
