// hb_timer: the outer guard's heartbeat countdown and attack alarm.
//
// Each matched heartbeat (hb_valid with hb_hit) loads a countdown from the
// table's timeout tmax. The countdown falls by one each clock; if it is at zero
// and no matched heartbeat arrives in that cycle, the timeout alarm is set.
// Timing: if a heartbeat is seen in cycle T, the next one is accepted in
// cycles T+tmin .. T+tmax; in cycle T+tmax without a heartbeat the timeout
// alarm is set (visible from cycle T+tmax+1).
// The timer is disarmed until the first matched heartbeat, so nothing is
// expected before the protected program starts.
//
// The design also allows a heartbeat to give a range of cycles rather than
// only a worst case; tmin is the lower end. A second countdown is loaded from
// tmin, and a matched heartbeat that arrives while it is still above zero
// (before cycle T+tmin) sets the early alarm. tmin = 0 disables that check.
//
// A non-cacheable store that matches no entry (hb_valid without hb_hit), e.g.
// a heartbeat that the inner guard failed to encipher, does not reload the
// timer, so it ends in a timeout alarm; it is not flagged at once, as the
// design describes. Alarms are sticky until reset; alarm is their OR.
// Counting in outer-guard clock cycles is this design's choice.
module hb_timer
  import shade_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hb_valid,   // a write to the heartbeat region was looked up
  input  logic     hb_hit,     // ... and matched a table entry
  input  hb_time_t hb_tmin,
  input  hb_time_t hb_tmax,
  output logic     armed,
  output hb_time_t remaining,  // cycles left before the timeout fires
  output logic     alarm_timeout,
  output logic     alarm_early,
  output logic     alarm
);

  logic     armed_q, to_q, early_q;
  hb_time_t rem_q, min_q;
  logic     beat;

  assign beat = hb_valid && hb_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed_q <= 1'b0;
      rem_q   <= '0;
      min_q   <= '0;
      to_q    <= 1'b0;
      early_q <= 1'b0;
    end else begin
      if (beat) begin
        if (armed_q && min_q != '0) early_q <= 1'b1;
        armed_q <= 1'b1;
        rem_q   <= (hb_tmax == '0) ? '0 : hb_tmax - 1'b1;
        min_q   <= (hb_tmin == '0) ? '0 : hb_tmin - 1'b1;
      end else if (armed_q) begin
        if (rem_q == '0) to_q <= 1'b1;
        else             rem_q <= rem_q - 1'b1;
        if (min_q != '0) min_q <= min_q - 1'b1;
      end
    end
  end

  assign armed         = armed_q;
  assign remaining     = rem_q;
  assign alarm_timeout = to_q;
  assign alarm_early   = early_q;
  assign alarm         = to_q | early_q;

endmodule
