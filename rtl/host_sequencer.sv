// host_sequencer: the readout host that drives the sensor's control inputs
// and decodes its output bus.
//
// Every frame_period clocks (the event frame rate: 50000 clocks at 50 MHz
// give 1k event frames per second) it issues a one-cycle SAMPLE, then runs
// the readout: XCLK is given every cycle of the readout and YCLK is pulsed
// once right after SAMPLE and once after every XEND it sees. When YEND is
// seen the frame is complete and a one-cycle RESTART is issued. If the
// readout takes longer than frame_period, the next SAMPLE follows the
// RESTART directly, so the frame rate adapts to the event count.
//
// The chip bus is registered on entry (one cycle of latency), which gives
// the idle cycle after XEND seen on the bus. Decoded groups come out as
// ev_valid / ev_gx / ev_gy (0-based group column and row) / ev (8 event
// bits). frame_done pulses with RESTART; frame_clocks is the length of the
// last readout: the number of clocks from the SAMPLE cycle to the cycle in
// which YEND was on the chip bus.
// The exact FSM and the registered bus are this design's choices; the
// published design states only that the host generates XCLK/YCLK independently of
// the chain state and that the SAMPLE frequency sets the frame rate.
module host_sequencer
  import dvs_pkg::*;
#(
  parameter int unsigned NGX    = NCOLS_DEFAULT / GROUP_W,
  parameter int unsigned NGY    = NROWS_DEFAULT / GROUP_H,
  parameter int unsigned ADDR_W = $clog2(((NGX > NGY) ? NGX : NGY) + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [31:0]       frame_period,
  // chip control
  output logic              sample,
  output logic              restart,
  output logic              xclk_en,
  output logic              yclk_en,
  // chip bus
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic              bus_is_y,
  input  group_events_t     bus_ev,
  // decoded output
  output logic              ev_valid,
  output logic [ADDR_W-1:0] ev_gx,
  output logic [ADDR_W-1:0] ev_gy,
  output group_events_t     ev,
  output logic              frame_done,
  output logic [31:0]       frame_clocks
);

  typedef enum logic [2:0] {S_IDLE, S_SAMPLE, S_FIRSTY, S_READ, S_RESTART, S_WAIT} state_t;

  localparam logic [ADDR_W-1:0] XEND = ADDR_W'(NGX + 1);
  localparam logic [ADDR_W-1:0] YEND = ADDR_W'(NGY + 1);

  state_t            st;
  logic [31:0]       tmr, rd_cnt;
  logic [ADDR_W-1:0] b_addr, cur_y;
  logic              b_is_y;
  group_events_t     b_ev;
  logic              see_xend, see_yend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_addr <= '0;
      b_is_y <= 1'b0;
      b_ev   <= '0;
    end else begin
      b_addr <= bus_addr;
      b_is_y <= bus_is_y;
      b_ev   <= bus_ev;
    end
  end

  assign see_xend = (st == S_READ) && !b_is_y && (b_addr == XEND);
  assign see_yend = (st == S_READ) &&  b_is_y && (b_addr == YEND);

  always_comb begin
    sample  = (st == S_SAMPLE);
    restart = (st == S_RESTART);
    xclk_en = (st == S_READ);
    yclk_en = (st == S_FIRSTY) || see_xend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      tmr          <= '0;
      rd_cnt       <= '0;
      cur_y        <= '0;
      frame_done   <= 1'b0;
      frame_clocks <= '0;
    end else begin
      frame_done <= 1'b0;
      tmr        <= tmr + 32'd1;
      rd_cnt     <= rd_cnt + 32'd1;
      case (st)
        S_IDLE:    if (enable) st <= S_SAMPLE;
        S_SAMPLE:  begin st <= S_FIRSTY; tmr <= 32'd1; rd_cnt <= 32'd1; end
        S_FIRSTY:  st <= S_READ;
        S_READ: begin
          if (b_is_y && b_addr != '0 && b_addr != YEND) cur_y <= b_addr - ADDR_W'(1);
          if (see_yend) begin
            st           <= S_RESTART;
            frame_clocks <= rd_cnt - 32'd1;
          end
        end
        S_RESTART: begin
          frame_done <= 1'b1;
          st         <= (!enable) ? S_IDLE : (tmr + 32'd1 >= frame_period) ? S_SAMPLE : S_WAIT;
        end
        S_WAIT:    if (tmr + 32'd1 >= frame_period) st <= enable ? S_SAMPLE : S_IDLE;
        default:   st <= S_IDLE;
      endcase
    end
  end

  // Decoded group events: an X address inside the array during readout.
  always_comb begin
    ev_valid = (st == S_READ) && !b_is_y && (b_addr != '0) && (b_addr != XEND);
    ev_gx    = b_addr - ADDR_W'(1);
    ev_gy    = cur_y;
    ev       = b_ev;
  end

endmodule
