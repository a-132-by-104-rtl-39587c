// gscl: Group Spatiotemporal Correlation Logic shared by a 2x2 pixel group.
//
// After SAMPLE it looks at the Event Memories of the four pixels, without
// telling ON from OFF, and decides with PASS whether the group may send its
// events. AL2 (at least 2): fewer than 2 stored events means uncorrelated
// noise, PASS=0. AM3 (at most 3): more than 3 stored events means the group
// lies inside a large uniformly active area carrying little spatial
// information, PASS=0. Either criterion can be enabled on its own.
// The output req is the group's request (PASS and at least one event).
// Purely combinational; the decision follows the Event Memories directly.
module gscl
  import dvs_pkg::*;
(
  input  logic [GROUP_PIX-1:0] me,   // Event Memory of the 4 pixels
  input  logic                 al2_en,
  input  logic                 am3_en,
  output logic                 pass,
  output logic                 req
);

  logic [2:0] cnt;

  always_comb begin
    cnt  = count4(me);
    pass = corr_pass(cnt, al2_en, am3_en);
    req  = pass && (cnt != 3'd0);
  end

endmodule
