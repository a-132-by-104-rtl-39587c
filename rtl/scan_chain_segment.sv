// scan_chain_segment: one segment of the X or Y scan chain.
//
// The chain passes an authorization signal that is a rising edge: once a
// segment's output has gone high it stays high until the chain is cleared.
// If the segment's row/column requests (req=1), the authorization goes
// through the clocked Service Path: the Present DFF copies the incoming
// authorization (prev) at a clock edge and drives the output. If req=0 it
// goes through the unclocked Skip Path: the output follows prev directly,
// so any number of idle segments is passed within one clock period.
// The Past DFF holds the Present DFF's value one clock later, and the
// Rising Edge Detector (present & ~past) marks the one clock period in
// which the segment is serviced.
//
// The chip relies on transistor switching-threshold differences so that a
// long skip ripple arriving late at a Service Path neither drops nor
// doubles a service; in this synchronous model the ripple settles within
// the cycle, so that concern does not arise.
// clk_en models the host-generated XCLK/YCLK as an enable of the one system
// clock; clr clears both DFFs at the start of a scan (own choice).
module scan_chain_segment (
  input  logic clk,
  input  logic rst_n,
  input  logic clk_en,   // XCLK/YCLK pulse
  input  logic clr,      // synchronous clear of the segment
  input  logic req,      // row/column request
  input  logic prev,     // authorization from the previous segment
  output logic present,  // authorization to the next segment
  output logic service   // this segment is being serviced
);

  logic present_q, past_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      present_q <= 1'b0;
      past_q    <= 1'b0;
    end else if (clr) begin
      present_q <= 1'b0;
      past_q    <= 1'b0;
    end else if (clk_en) begin
      present_q <= prev;
      past_q    <= present_q;
    end
  end

  assign present = req ? present_q : prev;
  assign service = req & present_q & ~past_q;

endmodule
