// tb_count_display: checks the two countdown digits for every count 0..60
// against a segment table kept in the testbench.
module tb_count_display;
  import qld_pkg::*;
  count_t     count;
  logic [7:0] seg_tens, seg_units;
  int checks = 0, failures = 0;
  // {dp,g,f,e,d,c,b,a} for 0..9
  localparam logic [7:0] SEG [10] = '{8'h3F, 8'h06, 8'h5B, 8'h4F, 8'h66,
                                       8'h6D, 8'h7D, 8'h07, 8'h7F, 8'h6F};

  count_display dut (.count(count), .seg_tens(seg_tens), .seg_units(seg_units));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, u;
    for (int c = 0; c <= 60; c++) begin
      count = 6'(c);
      t = 0; u = c;
      while (u >= 10) begin u -= 10; t++; end
      #1;
      checks += 2;
      if (seg_tens !== SEG[t] || seg_units !== SEG[u]) begin
        failures++;
        $display("FAIL count %0d: %h %h expected %h %h", c, seg_tens, seg_units, SEG[t], SEG[u]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
