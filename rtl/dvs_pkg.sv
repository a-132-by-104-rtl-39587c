// dvs_pkg: types and constants shared by the dynamic vision sensor RTL.
//
// The sensor array is 132 columns by 104 rows of pixels, organised as 2x2
// pixel groups (66 group columns by 52 group rows). Readout works on whole
// groups: one chip bus word carries the ON/OFF state of the four pixels of
// one group. The correlation filter settings (AL2 = at least 2 events,
// AM3 = at most 3 events) are programmable separately for the in-array
// group filter (GSCL) and the column filter (CSCL); having separate enable
// bits for the two stages is a choice of this design.
package dvs_pkg;

  // Pixel array size (pixels) and group size.
  localparam int unsigned NCOLS_DEFAULT = 132;
  localparam int unsigned NROWS_DEFAULT = 104;
  localparam int unsigned GROUP_W       = 2;
  localparam int unsigned GROUP_H       = 2;
  localparam int unsigned GROUP_PIX     = GROUP_W * GROUP_H;

  // Events of one group as they appear on the chip event bus.
  // Pixel index p = 2*row_in_group + col_in_group.
  typedef struct packed {
    logic [GROUP_PIX-1:0] on;
    logic [GROUP_PIX-1:0] off;
  } group_events_t;

  // Correlation filter configuration.
  typedef struct packed {
    logic gscl_al2;  // GSCL: drop a group holding fewer than 2 events
    logic gscl_am3;  // GSCL: drop a group holding more than 3 events
    logic cscl_al2;  // CSCL: per polarity, drop if fewer than 2 events
    logic cscl_am3;  // CSCL: per polarity, drop if more than 3 events
  } filter_cfg_t;

  // Number of events (set bits) among the four pixels of a group.
  function automatic logic [2:0] count4(input logic [GROUP_PIX-1:0] v);
    logic [2:0] c;
    c = '0;
    for (int i = 0; i < GROUP_PIX; i++) c = c + {2'b00, v[i]};
    return c;
  endfunction

  // The AL2/AM3 decision shared by GSCL and CSCL.
  function automatic logic corr_pass(input logic [2:0] cnt, input logic al2,
                                     input logic am3);
    return !(al2 && (cnt < 3'd2)) && !(am3 && (cnt > 3'd3));
  endfunction

endpackage
