// qld_tlc: queue-length based dynamic traffic light controller for a
// four-road junction.
//
// Each road has a three-lamp signal head (LIGn: 100 red, 010 yellow,
// 001 green), a group of pedestrian lamps (PdCrsn), four IR sensors along
// its median that measure the waiting queue (snsn), an IR sensor at the
// stop line (bit n-1 of sb_snr) and an RF receiver that hears approaching
// emergency vehicles (bit n-1 of emg_snr).
//
// The roads get green in turn. The length of each road's phase depends on
// its queue (four levels) and on the time of day: a built-in clock marks
// 07:00-09:59 and 17:00-20:59 as peak hours (PPeak) with phases of
// 15/30/45/60 s, other hours use 7/15/22/30 s; every phase ends with 3 s of
// yellow. An emergency vehicle preempts the cycle: 5 s all-yellow warning,
// 52 s green for its road, 3 s yellow, then the interrupted phase resumes.
// A vehicle crossing a stop line on red raises cam_buz. The time of day is
// shown on a multiplexed HH:MM display (segment_o, Digit_sel) and the
// seconds left in the running phase on two static digits (Seg_Out1 tens,
// Seg_Out2 units). `control` is the mode (1 = peak) the running phase was
// started with.
//
// Port names and widths are those of the original design. The clock runs
// at CLK_HZ (this design's default 50 MHz); `clr` is a synchronous,
// active-high reset. TMR_set, HR_set, MIN_set, emg_snr and sb_snr are
// asynchronous and pass two-flip-flop synchronisers (two cycles of delay).
// The queue sensors are sampled only at the start of a phase and are used
// as they are. While TMR_set is high the clock is stopped and each rising
// edge of HR_set / MIN_set advances the hours / minutes.
module qld_tlc
  import qld_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 1000
) (
  input  logic       clk,
  input  logic       clr,
  input  logic       TMR_set,
  input  logic       HR_set,
  input  logic       MIN_set,
  input  logic [3:0] emg_snr,
  input  logic [3:0] sb_snr,
  input  logic [3:0] sns1,
  input  logic [3:0] sns2,
  input  logic [3:0] sns3,
  input  logic [3:0] sns4,
  output logic [3:0] Digit_sel,
  output logic [2:0] LIG1,
  output logic [2:0] LIG2,
  output logic [2:0] LIG3,
  output logic [2:0] LIG4,
  output logic [3:0] PdCrs1,
  output logic [3:0] PdCrs2,
  output logic [3:0] PdCrs3,
  output logic [3:0] PdCrs4,
  output logic [7:0] segment_o,
  output logic [7:0] Seg_Out1,
  output logic [7:0] Seg_Out2,
  output logic       cam_buz,
  output logic       control,
  output logic       PPeak
);

  logic                tick;
  logic                tmr_s, hr_s, min_s;
  logic [3:0]          emg_s, sb_s;
  logic [4:0]          hours;
  logic [5:0]          minutes, seconds;
  logic                peak;
  level_t [NROADS-1:0] level;
  light_t [NROADS-1:0] lights;
  ped_t   [NROADS-1:0] pd;
  logic [NROADS-1:0]   red;
  road_t               road;
  count_t              count;
  logic                in_emg, warn, mode;

  second_tick #(.CLK_HZ(CLK_HZ)) u_tick (.clk(clk), .rst(clr), .tick(tick));

  sync2 #(.WIDTH(11)) u_sync (
    .clk(clk), .rst(clr),
    .d({TMR_set, HR_set, MIN_set, emg_snr, sb_snr}),
    .q({tmr_s,   hr_s,   min_s,   emg_s,   sb_s})
  );

  rtc_clock u_rtc (
    .clk(clk), .rst(clr), .tick(tick),
    .tmr_set(tmr_s), .hr_set(hr_s), .min_set(min_s),
    .hours(hours), .minutes(minutes), .seconds(seconds)
  );

  peak_mode u_peak (.hours(hours), .peak(peak));

  queue_level u_q1 (.sns(sns1), .level(level[0]));
  queue_level u_q2 (.sns(sns2), .level(level[1]));
  queue_level u_q3 (.sns(sns3), .level(level[2]));
  queue_level u_q4 (.sns(sns4), .level(level[3]));

  phase_ctrl u_phase (
    .clk(clk), .rst(clr), .tick(tick), .peak(peak), .level(level), .emg(emg_s),
    .lights(lights), .road(road), .count(count), .in_emg(in_emg), .warn(warn),
    .mode(mode)
  );

  ped_lights u_ped (.lights(lights), .warn(warn), .pd(pd));

  always_comb begin
    for (int i = 0; i < NROADS; i++) red[i] = (lights[i] == LIGHT_RED);
  end

  violation_detect u_viol (.clk(clk), .rst(clr), .sb(sb_s), .red(red), .cam_buz(cam_buz));

  time_display #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) u_tdisp (
    .clk(clk), .rst(clr), .hours(hours), .minutes(minutes),
    .digit_sel(Digit_sel), .segment(segment_o)
  );

  count_display u_cdisp (.count(count), .seg_tens(Seg_Out1), .seg_units(Seg_Out2));

  assign LIG1    = lights[0];
  assign LIG2    = lights[1];
  assign LIG3    = lights[2];
  assign LIG4    = lights[3];
  assign PdCrs1  = pd[0];
  assign PdCrs2  = pd[1];
  assign PdCrs3  = pd[2];
  assign PdCrs4  = pd[3];
  assign PPeak   = peak;
  assign control = mode;

endmodule
