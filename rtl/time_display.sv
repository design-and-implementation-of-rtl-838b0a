// time_display: multiplexed HH:MM display of the time of day.
//
// Four seven-segment digits share one segment bus (`segment`); `digit_sel`
// enables one digit at a time (one-hot, active high: bit 3 hours tens,
// bit 2 hours units, bit 1 minutes tens, bit 0 minutes units). A scan
// counter moves to the next digit every CLK_HZ/(4*SCAN_HZ) cycles, so each
// digit is refreshed SCAN_HZ times a second. The decimal point of the hours
// units digit separates hours from minutes. Segment bits are
// {dp,g,f,e,d,c,b,a}, active high.
//
// Timing: the digit select advances one cycle after the scan counter wraps;
// `segment` always matches the selected digit in the same cycle. Reset
// (synchronous, active high) selects the hours-tens digit. Scan rate,
// polarity and digit order are this design's choices.
module time_display #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 1000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] hours,
  input  logic [5:0] minutes,
  output logic [3:0] digit_sel,
  output logic [7:0] segment
);

  localparam int unsigned DWELL = (CLK_HZ / (4 * SCAN_HZ) > 0) ? CLK_HZ / (4 * SCAN_HZ) : 1;
  localparam int unsigned W     = (DWELL > 1) ? $clog2(DWELL) : 1;

  logic [W-1:0] scan;
  logic [1:0]   idx;     // 3 = hours tens .. 0 = minutes units
  logic [3:0]   digit;
  logic         dp;

  always_ff @(posedge clk) begin
    if (rst) begin
      scan <= '0;
      idx  <= 2'd3;
    end else if (scan == W'(DWELL - 1)) begin
      scan <= '0;
      idx  <= idx - 2'd1;
    end else begin
      scan <= scan + 1'b1;
    end
  end

  always_comb begin
    unique case (idx)
      2'd3:    digit = 4'(hours   / 5'd10);
      2'd2:    digit = 4'(hours   % 5'd10);
      2'd1:    digit = 4'(minutes / 6'd10);
      default: digit = 4'(minutes % 6'd10);
    endcase
    dp        = (idx == 2'd2);
    digit_sel = 4'b0001 << idx;
  end

  seg7_enc u_seg (.digit(digit), .dp(dp), .seg(segment));

endmodule
