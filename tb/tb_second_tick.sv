// tb_second_tick: checks that the one-second time base pulses for exactly
// one cycle every CLK_HZ cycles, starting CLK_HZ cycles after reset.
module tb_second_tick;
  localparam int unsigned CLK_HZ = 13;
  logic clk = 1'b0, rst = 1'b1, tick;
  int checks = 0, failures = 0;
  int cyc = 0;

  second_tick #(.CLK_HZ(CLK_HZ)) dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ticks = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // cyc counts clock edges since reset was released
    for (cyc = 1; cyc <= 20 * CLK_HZ + 3; cyc++) begin
      @(posedge clk);
      #1;
      checks++;
      if (tick !== ((cyc % CLK_HZ) == 0)) begin
        failures++;
        $display("FAIL cycle %0d tick=%0b", cyc, tick);
      end
      if (tick) ticks++;
    end
    checks++;
    if (ticks != 20) begin
      failures++;
      $display("FAIL tick count %0d, expected 20", ticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
