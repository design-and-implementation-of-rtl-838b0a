// ped_lights: pedestrian signal groups P1..P4.
//
// Each road has a group of four pedestrian lamps at its crossing. The group
// follows its road's vehicle light: while the road is red, pedestrians may
// cross (pattern 1001); while it is green or yellow, crossing is blocked
// (0110); during the all-yellow emergency warning every group shows 0011.
// The patterns are those of the original design; what each of the four
// lamps of a group means is not given there and they are reproduced as
// patterns. Purely combinational.
module ped_lights
  import qld_pkg::*;
(
  input  light_t [NROADS-1:0] lights,
  input  logic                warn,
  output ped_t   [NROADS-1:0] pd
);

  always_comb begin
    for (int i = 0; i < NROADS; i++) begin
      if (warn)                       pd[i] = PED_WARN;
      else if (lights[i] == LIGHT_RED) pd[i] = PED_WALK;
      else                            pd[i] = PED_BLOCK;
    end
  end

endmodule
