// qld_pkg: types and constants shared by the queue-length based dynamic
// traffic light controller.
//
// Light codes are the three-bit patterns of the vehicle signal heads, one bit
// per lamp: red 100, yellow 010, green 001. Pedestrian group codes are the
// four-bit patterns driven to each group of four pedestrian lamps: 1001 while
// the matching road is red (crossing allowed), 0110 while that road has green
// or yellow (crossing blocked), 0011 during the all-yellow emergency warning.
// These codes are the ones the original design shows in its waveforms.
//
// Phase lengths, in seconds, follow the design's timing tables: off-peak
// 7/15/22/30 s and peak 15/30/45/60 s for queue levels 1..4, each ending
// with 3 s of yellow. An emergency sequence lasts 60 s: 5 s of all-yellow
// warning, 52 s of green for the emergency road and 3 s of yellow.
package qld_pkg;

  localparam int NROADS = 4;

  // Vehicle signal head: {red, yellow, green}
  typedef logic [2:0] light_t;
  localparam light_t LIGHT_RED    = 3'b100;
  localparam light_t LIGHT_YELLOW = 3'b010;
  localparam light_t LIGHT_GREEN  = 3'b001;

  // Pedestrian group patterns
  typedef logic [3:0] ped_t;
  localparam ped_t PED_WALK  = 4'b1001;  // road red: pedestrians may cross
  localparam ped_t PED_BLOCK = 4'b0110;  // road green/yellow: crossing blocked
  localparam ped_t PED_WARN  = 4'b0011;  // emergency warning on all roads

  // Queue level 0..3 stands for the 1st..4th level of the timing tables
  typedef logic [1:0] level_t;
  typedef logic [1:0] road_t;
  typedef logic [5:0] count_t;           // seconds left in a phase, 0..60

  localparam int unsigned YELLOW_S    = 3;   // yellow at the end of every phase
  localparam int unsigned EMG_TOTAL_S = 60;  // emergency sequence length
  localparam int unsigned EMG_WARN_S  = 5;   // all-yellow warning at its start

  // Phase length in seconds for a queue level in the given mode.
  function automatic count_t phase_len(input logic peak, input level_t lvl);
    unique case ({peak, lvl})
      3'b0_00: return count_t'(7);
      3'b0_01: return count_t'(15);
      3'b0_10: return count_t'(22);
      3'b0_11: return count_t'(30);
      3'b1_00: return count_t'(15);
      3'b1_01: return count_t'(30);
      3'b1_10: return count_t'(45);
      default: return count_t'(60);
    endcase
  endfunction

endpackage
