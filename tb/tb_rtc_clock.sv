// tb_rtc_clock: checks the time-of-day clock against a seconds-of-day
// reference: normal counting over minute, hour and midnight rollovers,
// setting hours and minutes with button edges while TMR_set is high (a held
// button counts once, the clock stands still), and resumption afterwards.
module tb_rtc_clock;
  logic clk = 1'b0, rst = 1'b1;
  logic tick = 1'b0, tmr_set = 1'b0, hr_set = 1'b0, min_set = 1'b0;
  logic [4:0] hours;
  logic [5:0] minutes, seconds;
  int checks = 0, failures = 0;
  int ref_t = 0;   // expected time as seconds of the day

  rtc_clock dut (.clk(clk), .rst(rst), .tick(tick), .tmr_set(tmr_set), .hr_set(hr_set),
                 .min_set(min_set), .hours(hours), .minutes(minutes), .seconds(seconds));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (hours !== 5'(ref_t / 3600) || minutes !== 6'((ref_t / 60) % 60) || seconds !== 6'(ref_t % 60)) begin
      failures++;
      $display("FAIL %s: %0d:%0d:%0d expected %0d:%0d:%0d", what, hours, minutes, seconds,
               ref_t / 3600, (ref_t / 60) % 60, ref_t % 60);
    end
  endtask

  task automatic one_tick();
    tick = 1'b1;
    @(posedge clk); #1;
    tick = 1'b0;
    if (!tmr_set) ref_t = (ref_t + 1) % 86400;
    @(posedge clk); #1;
    check("tick");
  endtask

  task automatic press(input bit hour, input int hold);
    if (hour) hr_set = 1'b1; else min_set = 1'b1;
    repeat (hold) @(posedge clk);
    #1;
    hr_set = 1'b0; min_set = 1'b0;
    @(posedge clk); #1;
    if (hour) ref_t = ((ref_t / 3600 + 1) % 24) * 3600 + ref_t % 3600;
    else      ref_t = (ref_t / 3600) * 3600 + (((ref_t / 60) % 60 + 1) % 60) * 60;
    check("set");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check("reset");
    repeat (3700) one_tick();               // past a minute and an hour
    // set 06:59 : seconds drop to 0, hours +6 (from 1 to 7 would be +6), minutes to 59
    tmr_set = 1'b1;
    @(posedge clk); #1;
    ref_t = (ref_t / 60) * 60;
    check("enter set");
    while (ref_t / 3600 != 6) press(1'b1, 1 + $urandom_range(4));
    while ((ref_t / 60) % 60 != 59) press(1'b0, 1 + $urandom_range(4));
    repeat (5) one_tick();                  // clock must stand still
    tmr_set = 1'b0;
    repeat (65) one_tick();                 // 06:59 -> 07:00
    // set 23:59 and roll over midnight
    tmr_set = 1'b1;
    @(posedge clk); #1;
    ref_t = (ref_t / 60) * 60;
    check("enter set 2");
    while (ref_t / 3600 != 23) press(1'b1, 1);
    while ((ref_t / 60) % 60 != 59) press(1'b0, 2);
    press(1'b0, 1);                          // minutes wrap 59 -> 0 without hour carry
    while ((ref_t / 60) % 60 != 59) press(1'b0, 1);
    tmr_set = 1'b0;
    repeat (61) one_tick();
    checks++;
    if (ref_t >= 3600) begin failures++; $display("FAIL midnight not crossed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
