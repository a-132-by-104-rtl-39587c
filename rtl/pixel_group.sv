// pixel_group: a group of 2 by 2 pixels (2 rows by 2 columns) sharing one
// Group Spatiotemporal Correlation Logic (GSCL).
//
// Each pixel is a front end (behavioural model of the analog part) plus its
// Digital Domain (Event Memory). After SAMPLE the GSCL reads the four Event
// Memories and decides PASS; the group presents its stored ON/OFF events
// only when PASS=1, and raises req when it has something to send. RESTART
// restarts every pixel of the group with ME=1, whether or not it passed.
//
// Pixel index p = 2*row_in_group + col_in_group, in log_i and in the event
// word. Timing: events and req are valid the cycle after the SAMPLE pulse
// and stay until RESTART.
module pixel_group
  import dvs_pkg::*;
#(
  parameter int unsigned LOGI_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LOGI_W-1:0] log_i [GROUP_PIX],
  input  logic [LOGI_W-1:0] th_on,
  input  logic [LOGI_W-1:0] th_off,
  input  logic              sample,
  input  logic              restart,
  input  logic              al2_en,
  input  logic              am3_en,
  output group_events_t     ev,     // stored events, zero when PASS=0
  output logic              req,    // PASS and at least one stored event
  output logic              pass
);

  logic [GROUP_PIX-1:0] on_evt, off_evt, rst_pix, me, ev_on, ev_off;

  for (genvar p = 0; p < GROUP_PIX; p++) begin : g_pix
    pixel_frontend #(.LOGI_W(LOGI_W)) u_fe (
      .clk     (clk),
      .rst_n   (rst_n),
      .log_i   (log_i[p]),
      .th_on   (th_on),
      .th_off  (th_off),
      .rst_pix (rst_pix[p]),
      .on_evt  (on_evt[p]),
      .off_evt (off_evt[p])
    );
    pixel_digital u_dd (
      .clk     (clk),
      .rst_n   (rst_n),
      .sample  (sample),
      .restart (restart),
      .on_evt  (on_evt[p]),
      .off_evt (off_evt[p]),
      .rst_pix (rst_pix[p]),
      .me      (me[p]),
      .ev_on   (ev_on[p]),
      .ev_off  (ev_off[p])
    );
  end

  gscl u_gscl (
    .me     (me),
    .al2_en (al2_en),
    .am3_en (am3_en),
    .pass   (pass),
    .req    (req)
  );

  assign ev.on  = pass ? ev_on  : '0;
  assign ev.off = pass ? ev_off : '0;

endmodule
