// rtc_clock: 24-hour time-of-day clock with push-button setting.
//
// Seconds, minutes and hours are binary counters (0..59, 0..59, 0..23) that
// advance on the one-second `tick`. The time of day selects peak or
// off-peak timing for the traffic lights and is shown on the HH:MM display.
//
// Setting: while `tmr_set` is high the clock stands still with seconds held
// at 0, and each rising edge of `hr_set` or `min_set` advances the hours
// (mod 24) or minutes (mod 60) by one; minutes do not carry into hours while
// setting. The inputs must already be synchronised to `clk`. The setting
// inputs come from the original design; treating them as push buttons that
// step the time is this design's reading of them.
//
// Timing: outputs are registered and change the cycle after a tick or a
// button edge. Reset (synchronous, active high) sets 00:00:00.
module rtc_clock (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       tmr_set,
  input  logic       hr_set,
  input  logic       min_set,
  output logic [4:0] hours,
  output logic [5:0] minutes,
  output logic [5:0] seconds
);

  logic hr_q, min_q;
  logic hr_inc, min_inc;

  assign hr_inc  = hr_set  & ~hr_q;
  assign min_inc = min_set & ~min_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      hr_q    <= 1'b0;
      min_q   <= 1'b0;
      hours   <= '0;
      minutes <= '0;
      seconds <= '0;
    end else begin
      hr_q  <= hr_set;
      min_q <= min_set;
      if (tmr_set) begin
        seconds <= '0;
        if (hr_inc)  hours   <= (hours   == 5'd23) ? 5'd0 : hours + 5'd1;
        if (min_inc) minutes <= (minutes == 6'd59) ? 6'd0 : minutes + 6'd1;
      end else if (tick) begin
        if (seconds != 6'd59) begin
          seconds <= seconds + 6'd1;
        end else begin
          seconds <= '0;
          if (minutes != 6'd59) begin
            minutes <= minutes + 6'd1;
          end else begin
            minutes <= '0;
            hours   <= (hours == 5'd23) ? 5'd0 : hours + 5'd1;
          end
        end
      end
    end
  end

endmodule
