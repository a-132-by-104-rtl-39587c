// cscl: Column Spatiotemporal Correlation Logic, one per column of groups.
//
// During readout of a row of groups it filters the events of the group of
// its column with the same AL2/AM3 rule as the GSCL, but separately for ON
// and OFF events: ON events are kept only if the ON count of the group
// passes, OFF events only if the OFF count passes. The column request xreq
// (used by the X scan chain) is set when any event survives.
// Purely combinational.
module cscl
  import dvs_pkg::*;
(
  input  group_events_t ev_in,
  input  logic          al2_en,
  input  logic          am3_en,
  output group_events_t ev_out,
  output logic          xreq
);

  logic pass_on, pass_off;

  always_comb begin
    pass_on    = corr_pass(count4(ev_in.on),  al2_en, am3_en);
    pass_off   = corr_pass(count4(ev_in.off), al2_en, am3_en);
    ev_out.on  = pass_on  ? ev_in.on  : '0;
    ev_out.off = pass_off ? ev_in.off : '0;
    xreq       = |{ev_out.on, ev_out.off};
  end

endmodule
