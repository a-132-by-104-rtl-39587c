// pixel_digital: the Digital Domain of one DVS pixel, which replaces the
// per-pixel request/acknowledge handshake of earlier event sensors.
//
// A SAMPLE pulse copies the comparator state of the front end into the
// Event Memory: ME (an event is stored) and its polarity. The whole array is
// sampled at the same clock edge, so the memories together hold one event
// frame. A RESTART pulse, issued after the frame has been read out, resets
// every pixel whose Event Memory is non-empty: the front end is restarted
// (rst_pix for one cycle) and ME is cleared. Pixels with ME=0 keep running,
// so a crossing that happens during readout is taken by the next SAMPLE.
//
// Interface: sample and restart are one-cycle pulses common to the array.
// on/off outputs are the stored event (at most one of them is set).
// Timing: memory valid the cycle after sample; rst_pix is combinational
// from restart & ME. Both pulses together are not expected; sample wins.
module pixel_digital (
  input  logic clk,
  input  logic rst_n,
  input  logic sample,
  input  logic restart,
  input  logic on_evt,    // from the front end comparators
  input  logic off_evt,
  output logic rst_pix,   // restart of the front end
  output logic me,        // Event Memory non-empty
  output logic ev_on,     // stored ON event
  output logic ev_off     // stored OFF event
);

  logic pol_q;  // 1 = ON

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      me    <= 1'b0;
      pol_q <= 1'b0;
    end else if (sample) begin
      me    <= on_evt | off_evt;
      pol_q <= on_evt;
    end else if (restart) begin
      me    <= 1'b0;
    end
  end

  assign ev_on   = me & pol_q;
  assign ev_off  = me & ~pol_q;
  assign rst_pix = restart & me & ~sample;

endmodule
