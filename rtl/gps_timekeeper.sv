// gps_timekeeper: GPS-disciplined time of day with microsecond resolution.
//
// The GPS receiver delivers a pulse-per-second (`pps`, asynchronous) and,
// ahead of each pulse, the UTC second that the pulse begins (`gps_sec`,
// qualified by `gps_sec_valid`). On each PPS rising edge with a valid second
// the keeper loads that second, clears the microsecond count and reports
// `locked`. Between pulses a prescaler of TICKS_PER_US clock cycles advances
// the microsecond count, and the second rolls over on its own at 999_999 us,
// so time keeps running if a pulse is late. If no pulse arrives for
// LOCK_TIMEOUT_US microseconds, `locked` drops until the next pulse.
//
// `now` is the current time, registered. The PPS input passes a two-flop
// synchroniser, so the keeper realigns three clock cycles after the pin.
//
// The document stamps every sample with GPS time in microseconds and holds
// the start of acquisition until the timekeeper reports lock; how the
// timekeeper works inside, the interface to the receiver and the loss-of-
// lock timeout are this design's own.
module gps_timekeeper
  import lightning_pkg::*;
#(
  parameter int unsigned CLK_HZ          = 40_000_000,
  parameter int unsigned LOCK_TIMEOUT_US = 1_500_000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pps,
  input  logic [SEC_W-1:0] gps_sec,
  input  logic             gps_sec_valid,
  output timestamp_t       now,
  output logic             locked
);

  localparam int unsigned TICKS_PER_US = CLK_HZ / 1_000_000;
  localparam int unsigned PRE_W = (TICKS_PER_US > 1) ? $clog2(TICKS_PER_US) : 1;
  localparam int unsigned TO_W  = $clog2(LOCK_TIMEOUT_US + 1);

  logic [2:0]      pps_sync;       // two synchroniser stages + edge history
  logic            pps_edge;
  logic [PRE_W-1:0] prescale;
  logic [TO_W-1:0]  since_pps;     // microseconds since the last pulse
  logic             us_step;

  assign pps_edge = pps_sync[1] & ~pps_sync[2];
  assign us_step  = (prescale == PRE_W'(TICKS_PER_US - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pps_sync <= '0;
    else        pps_sync <= {pps_sync[1:0], pps};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prescale  <= '0;
      now       <= '0;
      locked    <= 1'b0;
      since_pps <= '0;
    end else if (pps_edge && gps_sec_valid) begin
      prescale  <= '0;
      now.sec   <= gps_sec;
      now.usec  <= '0;
      locked    <= 1'b1;
      since_pps <= '0;
    end else begin
      if (us_step) begin
        prescale <= '0;
        if (now.usec == USEC_W'(USEC_PER_SEC - 1)) begin
          now.usec <= '0;
          now.sec  <= now.sec + SEC_W'(1);
        end else begin
          now.usec <= now.usec + USEC_W'(1);
        end
        if (since_pps == TO_W'(LOCK_TIMEOUT_US)) locked <= 1'b0;
        else                                    since_pps <= since_pps + TO_W'(1);
      end else begin
        prescale <= prescale + PRE_W'(1);
      end
    end
  end

endmodule
