// count_display: two-digit countdown display of the running phase.
//
// Shows the seconds left in the running phase (0..60) on two seven-segment
// digits driven in parallel: `seg_tens` (Seg_Out1) and `seg_units`
// (Seg_Out2), bit order {dp,g,f,e,d,c,b,a}, active high. A leading zero is
// shown. Purely combinational. Reading these outputs as the phase countdown
// rather than the clock's seconds is this design's choice.
module count_display
  import qld_pkg::*;
(
  input  count_t     count,
  output logic [7:0] seg_tens,
  output logic [7:0] seg_units
);

  logic [3:0] tens, units;

  always_comb begin
    tens  = 4'(count / 6'd10);
    units = 4'(count % 6'd10);
  end

  seg7_enc u_tens  (.digit(tens),  .dp(1'b0), .seg(seg_tens));
  seg7_enc u_units (.digit(units), .dp(1'b0), .seg(seg_units));

endmodule
