// violation_detect: red-light violation trigger for the camera/buzzer.
//
// An IR sensor at each stop line reports a vehicle crossing it. A crossing
// while that road shows red is a violation; `cam_buz` then goes high to
// start the camera or sound the buzzer. It follows the sensors with one
// register stage and stays high for as long as a sensor of a red road is
// active. Checking the road's light (rather than raising the trigger on any
// crossing) is this design's reading of the original, which describes the
// sensors as catching vehicles that cross on red.
//
// Inputs must be synchronous to `clk`; bit i belongs to road i+1. Reset is
// synchronous and active high.
module violation_detect
  import qld_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [NROADS-1:0] sb,
  input  logic [NROADS-1:0] red,
  output logic              cam_buz
);

  always_ff @(posedge clk) begin
    if (rst) cam_buz <= 1'b0;
    else     cam_buz <= |(sb & red);
  end

endmodule
