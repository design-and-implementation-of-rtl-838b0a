// tb_ped_lights: checks the pedestrian patterns for random combinations of
// vehicle lights, with and without the emergency warning.
module tb_ped_lights;
  import qld_pkg::*;
  light_t [3:0] lights;
  logic         warn;
  ped_t   [3:0] pd;
  int checks = 0, failures = 0;
  localparam logic [2:0] CODES [3] = '{3'b100, 3'b010, 3'b001};

  ped_lights dut (.lights(lights), .warn(warn), .pd(pd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_pd;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++) lights[i] = CODES[$urandom_range(2)];
      warn = ($urandom_range(3) == 0);
      #1;
      for (int i = 0; i < 4; i++) begin
        if (warn)                   exp_pd = 4'b0011;
        else if (lights[i] == 3'b100) exp_pd = 4'b1001;
        else                        exp_pd = 4'b0110;
        checks++;
        if (pd[i] !== exp_pd) begin
          failures++;
          $display("FAIL road %0d light=%b warn=%0b pd=%b expected %b", i + 1, lights[i], warn, pd[i], exp_pd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
