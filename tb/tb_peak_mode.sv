// tb_peak_mode: checks the peak/off-peak decision for every hour of the day
// against the peak windows 07:00-09:59 and 17:00-20:59.
module tb_peak_mode;
  logic [4:0] hours;
  logic       peak;
  int checks = 0, failures = 0;
  // expected peak flag for hours 0..23
  localparam logic [23:0] PEAK_HOURS = 24'h1E_0380;

  peak_mode dut (.hours(hours), .peak(peak));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 24; h++) begin
      hours = 5'(h);
      #1;
      checks++;
      if (peak !== PEAK_HOURS[h]) begin
        failures++;
        $display("FAIL hour %0d peak=%0b", h, peak);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
