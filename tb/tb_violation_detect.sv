// tb_violation_detect: drives random stop-line sensor and red-light
// patterns and checks that cam_buz rises one cycle later exactly when a
// sensor of a red road is active.
module tb_violation_detect;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] sb, red;
  logic cam_buz;
  int checks = 0, failures = 0, hits = 0;

  violation_detect dut (.clk(clk), .rst(rst), .sb(sb), .red(red), .cam_buz(cam_buz));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q;
    sb = '0; red = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (cam_buz !== 1'b0) begin failures++; $display("FAIL cam_buz after reset"); end
    exp_q = 1'b0;
    for (int n = 0; n < 500; n++) begin
      sb  = 4'($urandom);
      red = 4'($urandom);
      exp_q = 1'b0;
      for (int i = 0; i < 4; i++) if (sb[i] && red[i]) exp_q = 1'b1;
      @(posedge clk);
      #1;
      checks++;
      if (cam_buz !== exp_q) begin
        failures++;
        $display("FAIL sb=%b red=%b cam_buz=%0b", sb, red, cam_buz);
      end
      if (exp_q) hits++;
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no violation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
