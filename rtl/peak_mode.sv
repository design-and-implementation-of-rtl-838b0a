// peak_mode: peak / off-peak decision from the hour of day.
//
// The controller uses longer phases during the rush hours. Following the
// original design, the peak windows are 7 to 10 in the morning and 5 to 9
// in the evening, read here as 07:00-09:59 and 17:00-20:59. Purely
// combinational: `peak` follows `hours` with no delay.
module peak_mode (
  input  logic [4:0] hours,
  output logic       peak
);

  always_comb begin
    peak = ((hours >= 5'd7)  && (hours <= 5'd9)) ||
           ((hours >= 5'd17) && (hours <= 5'd20));
  end

endmodule
