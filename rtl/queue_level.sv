// queue_level: queue length of one road from its four median IR sensors.
//
// Four IR sensors lie along the median of each approach, bit 0 nearest the
// stop line. A waiting queue covers the sensors from the stop line outward,
// so the farthest covered sensor gives the queue length: sensors 0001 are
// the 1st level, 0011 the 2nd, 0111 the 3rd and 1111 the 4th (the patterns
// of the original design). A gap in the pattern (e.g. 0101) counts as the
// farthest covered sensor, and an empty road counts as the 1st level; both
// are this design's choices. Output `level` is 0..3 for the 1st..4th level.
// Purely combinational.
module queue_level
  import qld_pkg::*;
(
  input  logic [3:0] sns,
  output level_t     level
);

  always_comb begin
    if (sns[3])      level = 2'd3;
    else if (sns[2]) level = 2'd2;
    else if (sns[1]) level = 2'd1;
    else             level = 2'd0;
  end

endmodule
