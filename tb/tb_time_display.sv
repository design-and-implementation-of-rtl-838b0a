// tb_time_display: runs the HH:MM display with a short scan period and
// checks, for several times of day, that each digit select is one-hot,
// that the digits come in the order hours tens, hours units, minutes tens,
// minutes units, that each is held DWELL cycles, and that the segments
// match the selected digit (decimal point on the hours units digit).
module tb_time_display;
  localparam int unsigned CLK_HZ = 40, SCAN_HZ = 2;
  localparam int unsigned DWELL = CLK_HZ / (4 * SCAN_HZ);
  logic clk = 1'b0, rst = 1'b1;
  logic [4:0] hours;
  logic [5:0] minutes;
  logic [3:0] digit_sel;
  logic [7:0] segment;
  int checks = 0, failures = 0;
  localparam logic [7:0] SEG [10] = '{8'h3F, 8'h06, 8'h5B, 8'h4F, 8'h66,
                                       8'h6D, 8'h7D, 8'h07, 8'h7F, 8'h6F};

  time_display #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) dut (
    .clk(clk), .rst(rst), .hours(hours), .minutes(minutes),
    .digit_sel(digit_sel), .segment(segment));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, m;
    logic [3:0] d [4];
    logic [7:0] exp_seg;
    hours = 0; minutes = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 12; n++) begin
      h = (n == 0) ? 23 : $urandom_range(23);
      m = (n == 0) ? 59 : $urandom_range(59);
      hours = 5'(h); minutes = 6'(m);
      #1;
      d[0] = 4'(h / 10); d[1] = 4'(h % 10); d[2] = 4'(m / 10); d[3] = 4'(m % 10);
      // one full scan: 4 digits, DWELL cycles each
      for (int k = 0; k < 4; k++) begin
        for (int c = 0; c < DWELL; c++) begin
          exp_seg = SEG[d[k]] | ((k == 1) ? 8'h80 : 8'h00);
          checks++;
          if (digit_sel !== (4'b1000 >> k) || segment !== exp_seg) begin
            failures++;
            $display("FAIL %0d:%0d digit %0d sel=%b seg=%h expected %b %h", h, m, k, digit_sel, segment,
                     4'b1000 >> k, exp_seg);
          end
          @(posedge clk);
          #1;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
