// tb_queue_level: checks the queue level for all 16 sensor patterns. The
// expected level is the number of the farthest covered sensor (1..4), with
// an empty road counted as level 1.
module tb_queue_level;
  import qld_pkg::*;
  logic [3:0] sns;
  level_t     level;
  int checks = 0, failures = 0;

  queue_level dut (.sns(sns), .level(level));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_lvl;
    for (int v = 0; v < 16; v++) begin
      sns = 4'(v);
      // farthest covered sensor, counted 1..4; an empty road is level 1
      if (v >= 8)      exp_lvl = 4;
      else if (v >= 4) exp_lvl = 3;
      else if (v >= 2) exp_lvl = 2;
      else             exp_lvl = 1;
      #1;
      checks++;
      if (int'(level) + 1 != exp_lvl) begin
        failures++;
        $display("FAIL sns=%b level=%0d expected %0d", sns, int'(level) + 1, exp_lvl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
