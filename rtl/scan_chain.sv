// scan_chain: the X (column) or Y (row) scan chain, N segments followed by
// an end segment.
//
// The authorization enters at segment 0 when start is high and travels
// towards the end segment. Segments without a request are skipped within
// the same clock; each requesting segment is serviced for exactly one
// clk_en period, in index order, so the chain visits requesting rows or
// columns one per clock without arbitration. The end segment always
// requests: its service marks that the whole scan is complete.
//
// addr is the address of the segment being serviced: index+1 for segment
// index, N+1 (END) for the end segment, and 0 while no segment is serviced,
// i.e. while the authorization is still on a Skip Path or the chain is idle.
// Numbering from 1 so that 0 can mean "nothing" is this design's choice.
module scan_chain #(
  parameter int unsigned N      = 66,
  parameter int unsigned ADDR_W = $clog2(N + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_en,
  input  logic              clr,
  input  logic              start,      // authorization into segment 0
  input  logic [N-1:0]      req,
  output logic [N-1:0]      service,    // one-hot (or zero)
  output logic              end_service,
  output logic [ADDR_W-1:0] addr
);

  for (genvar i = 0; i <= N; i++) begin : g_seg
    logic auth_in, auth_out, seg_req, seg_srv;
    if (i == 0) begin : g_first
      assign auth_in = start;
    end else begin : g_next
      assign auth_in = g_seg[i-1].auth_out;
    end
    if (i < N) begin : g_row
      assign seg_req    = req[i];
      assign service[i] = seg_srv;
    end else begin : g_end
      assign seg_req     = 1'b1;
      assign end_service = seg_srv;
    end
    scan_chain_segment u_seg (
      .clk     (clk),
      .rst_n   (rst_n),
      .clk_en  (clk_en),
      .clr     (clr),
      .req     (seg_req),
      .prev    (auth_in),
      .present (auth_out),
      .service (seg_srv)
    );
  end

  always_comb begin
    addr = '0;
    for (int i = 0; i < N; i++)
      if (service[i]) addr = addr | ADDR_W'(i + 1);
    if (end_service) addr = addr | ADDR_W'(N + 1);
  end

endmodule
