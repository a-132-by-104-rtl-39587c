// pixel_frontend: behavioural model of the analog part of a DVS pixel
// (photodiode, logarithmic photoreceptor, change amplifier and the ON/OFF
// comparators). It is not a circuit description: it stands in for the
// analog front end so that the digital readout can be simulated.
//
// The model works on a digital log-intensity value log_i. While not held in
// reset it compares log_i with the level memorised at the last reset; when
// the rise reaches th_on it raises on_evt, when the fall reaches th_off it
// raises off_evt. The first crossing is latched and held (the pixel waits to
// be restarted), as a DVS change detector does. Holding rst_pix high
// memorises the present log_i and clears both outputs. After rst_n the
// pixel comes up in reset: its first clock memorises log_i.
//
// Timing: one clk cycle from a log_i change to the comparator output;
// rst_pix acts at the clock edge, rst_n asynchronously. The thresholds,
// the sampled-data behaviour and the widths are this model's choices; the
// published design only names the analog parts.
module pixel_frontend #(
  parameter int unsigned LOGI_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LOGI_W-1:0] log_i,    // log intensity seen by the photodiode
  input  logic [LOGI_W-1:0] th_on,    // ON contrast threshold
  input  logic [LOGI_W-1:0] th_off,   // OFF contrast threshold
  input  logic              rst_pix,  // restart from the pixel digital domain
  output logic              on_evt,
  output logic              off_evt
);

  logic [LOGI_W-1:0] ref_q;
  logic              armed_q;  // 0 until the first level has been memorised
  logic [LOGI_W-1:0] rise, fall;  // only used in the direction that applies

  always_comb begin
    rise = log_i - ref_q;
    fall = ref_q - log_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q   <= '0;
      armed_q <= 1'b0;
      on_evt  <= 1'b0;
      off_evt <= 1'b0;
    end else if (rst_pix || !armed_q) begin
      armed_q <= 1'b1;
      ref_q   <= log_i;
      on_evt  <= 1'b0;
      off_evt <= 1'b0;
    end else if (!on_evt && !off_evt) begin
      if (log_i > ref_q && rise >= th_on)       on_evt  <= 1'b1;
      else if (ref_q > log_i && fall >= th_off) off_evt <= 1'b1;
    end
  end

endmodule
