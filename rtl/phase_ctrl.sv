// phase_ctrl: signal phase sequencer with emergency preemption.
//
// Normal operation: the four roads get the right of way in turn, 1-2-3-4.
// When a road's phase starts, its queue level and the current mode (peak or
// off-peak) are sampled and the phase length is looked up with
// qld_pkg::phase_len (off-peak 7/15/22/30 s, peak 15/30/45/60 s for levels
// 1..4). The phase counter is loaded with that length and counts down once
// per second; the road shows green while more than 3 s remain and yellow for
// the last 3 s. All other roads show red. When the count would pass 1, the
// next road's phase starts.
//
// Emergency: a newly asserted bit of `emg` (an RF receiver picking up an
// emergency vehicle) starts a 60 s sequence for that road (lowest road wins
// if several rise together): 5 s with every road yellow as a warning, then
// 52 s green for the emergency road, then 3 s yellow. The normal phase is
// frozen meanwhile and afterwards continues where it was interrupted, with
// the same road and the same seconds left. A bit that stays high does not
// start a second sequence, and requests during a sequence are ignored.
//
// The phase lengths, light codes, emergency timing and resume behaviour are
// the original design's; the fixed road order, the sampling instant and the
// edge-triggered emergency request are this design's choices.
//
// Interface: `tick` is the one-second enable, `level[i]` and `emg[i]` belong
// to road i+1 and must be synchronous to `clk`. `lights[i]` is the light
// code of road i+1. `count` is the seconds left in the running phase or
// emergency sequence, `road` the road it belongs to, `mode` the mode sampled
// at the start of the running phase. All outputs are derived from
// registers; a new emergency takes effect on the cycle after the request.
// Reset (synchronous, active high) starts road 1's phase.
module phase_ctrl
  import qld_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  tick,
  input  logic                  peak,
  input  level_t [NROADS-1:0]   level,
  input  logic   [NROADS-1:0]   emg,
  output light_t [NROADS-1:0]   lights,
  output road_t                 road,
  output count_t                count,
  output logic                  in_emg,
  output logic                  warn,
  output logic                  mode
);

  road_t                cur_road;   // road of the normal phase
  count_t               cur_cnt;    // seconds left in the normal phase
  road_t                emg_road;
  count_t               emg_cnt;
  logic [NROADS-1:0]    emg_q;
  logic [NROADS-1:0]    emg_new;
  road_t                next_road;
  road_t                req_road;

  assign emg_new   = emg & ~emg_q;
  assign next_road = cur_road + road_t'(1);

  always_comb begin
    req_road = '0;
    for (int i = NROADS - 1; i >= 0; i--) begin
      if (emg_new[i]) req_road = road_t'(i);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      emg_q    <= '0;
      cur_road <= '0;
      cur_cnt  <= phase_len(peak, level[0]);
      mode     <= peak;
      in_emg   <= 1'b0;
      emg_road <= '0;
      emg_cnt  <= '0;
    end else begin
      emg_q <= emg;
      if (!in_emg) begin
        if (emg_new != '0) begin
          in_emg   <= 1'b1;
          emg_road <= req_road;
          emg_cnt  <= count_t'(EMG_TOTAL_S);
        end else if (tick) begin
          if (cur_cnt <= count_t'(1)) begin
            cur_road <= next_road;
            cur_cnt  <= phase_len(peak, level[next_road]);
            mode     <= peak;
          end else begin
            cur_cnt  <= cur_cnt - count_t'(1);
          end
        end
      end else if (tick) begin
        if (emg_cnt <= count_t'(1)) begin
          in_emg  <= 1'b0;
          emg_cnt <= '0;
        end else begin
          emg_cnt <= emg_cnt - count_t'(1);
        end
      end
    end
  end

  assign warn  = in_emg && (emg_cnt > count_t'(EMG_TOTAL_S - EMG_WARN_S));
  assign road  = in_emg ? emg_road : cur_road;
  assign count = in_emg ? emg_cnt  : cur_cnt;

  always_comb begin
    for (int i = 0; i < NROADS; i++) begin
      if (warn)
        lights[i] = LIGHT_YELLOW;
      else if (road_t'(i) != road)
        lights[i] = LIGHT_RED;
      else if (count > count_t'(YELLOW_S))
        lights[i] = LIGHT_GREEN;
      else
        lights[i] = LIGHT_YELLOW;
    end
  end

endmodule
