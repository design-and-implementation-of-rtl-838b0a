// seg7_enc: BCD digit to seven-segment pattern.
//
// Output bits are {dp, g, f, e, d, c, b, a}, active high (1 lights a
// segment). Digits 0..9 give the usual figures; codes 10..15 blank the
// digit. `dp` lights the decimal point. Purely combinational. Polarity and
// bit order are this design's choice.
module seg7_enc (
  input  logic [3:0] digit,
  input  logic       dp,
  output logic [7:0] seg
);

  logic [6:0] s;

  always_comb begin
    unique case (digit)
      4'd0:    s = 7'b011_1111;
      4'd1:    s = 7'b000_0110;
      4'd2:    s = 7'b101_1011;
      4'd3:    s = 7'b100_1111;
      4'd4:    s = 7'b110_0110;
      4'd5:    s = 7'b110_1101;
      4'd6:    s = 7'b111_1101;
      4'd7:    s = 7'b000_0111;
      4'd8:    s = 7'b111_1111;
      4'd9:    s = 7'b110_1111;
      default: s = 7'b000_0000;
    endcase
    seg = {dp, s};
  end

endmodule
