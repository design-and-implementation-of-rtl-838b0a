// tb_qld_tlc_full: the controller at its default parameters (50 MHz
// clock, so one second is 50 000 000 cycles), through two complete phases.
//
// All queues are short (1st level) and the clock starts at 00:00 after
// reset, i.e. off-peak, so every road gets a 7 s phase: 4 s green, 3 s
// yellow. The test follows road 1 from reset, hands over to road 2, runs
// road 2's whole phase and ends at the handover to road 3 (14 s, 700
// million cycles). It checks the green and yellow times in clock cycles,
// that only one road is ever not red, the pedestrian groups, the countdown
// shown at each phase start, and cam_buz for a red-light crossing.
module tb_qld_tlc_full;
  localparam longint SEC = 50_000_000;
  localparam logic [7:0] SEG [10] = '{8'h3F, 8'h06, 8'h5B, 8'h4F, 8'h66,
                                       8'h6D, 8'h7D, 8'h07, 8'h7F, 8'h6F};
  logic clk = 1'b0, clr = 1'b1;
  logic [3:0] sb_snr = '0;
  logic [3:0] Digit_sel;
  logic [2:0] LIG1, LIG2, LIG3, LIG4;
  logic [3:0] PdCrs1, PdCrs2, PdCrs3, PdCrs4;
  logic [7:0] segment_o, Seg_Out1, Seg_Out2;
  logic cam_buz, control, PPeak;
  int checks = 0, failures = 0;

  qld_tlc dut (
    .clk(clk), .clr(clr), .TMR_set(1'b0), .HR_set(1'b0), .MIN_set(1'b0),
    .emg_snr(4'b0000), .sb_snr(sb_snr), .sns1(4'b0001), .sns2(4'b0001), .sns3(4'b0001), .sns4(4'b0001),
    .Digit_sel(Digit_sel), .LIG1(LIG1), .LIG2(LIG2), .LIG3(LIG3), .LIG4(LIG4),
    .PdCrs1(PdCrs1), .PdCrs2(PdCrs2), .PdCrs3(PdCrs3), .PdCrs4(PdCrs4),
    .segment_o(segment_o), .Seg_Out1(Seg_Out1), .Seg_Out2(Seg_Out2),
    .cam_buz(cam_buz), .control(control), .PPeak(PPeak));

  always #10 clk = ~clk;

  initial begin
    #(20.0 * 20.0 * SEC);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] lig(int i);
    case (i)
      0: return LIG1;
      1: return LIG2;
      2: return LIG3;
      default: return LIG4;
    endcase
  endfunction

  function automatic logic [3:0] pdc(int i);
    case (i)
      0: return PdCrs1;
      1: return PdCrs2;
      2: return PdCrs3;
      default: return PdCrs4;
    endcase
  endfunction

  // wait for `code` on road `r`; n is the number of clock cycles waited.
  // Event-driven (wakes only when a light changes) to keep the run fast.
  task automatic wait_for(int r, logic [2:0] code, output longint n);
    realtime t0;
    t0 = $realtime;
    while (lig(r) !== code) @(LIG1 or LIG2 or LIG3 or LIG4);
    n = longint'(($realtime - t0) / 20.0 + 0.5);
    #1;
  endtask

  task automatic snapshot(int r);
    int nonred;
    nonred = 0;
    for (int i = 0; i < 4; i++) begin
      if (lig(i) != 3'b100) nonred++;
      checks++;
      if (pdc(i) !== ((lig(i) == 3'b100) ? 4'b1001 : 4'b0110)) begin
        failures++;
        $display("FAIL PdCrs%0d=%b with LIG%0d=%b", i + 1, pdc(i), i + 1, lig(i));
      end
    end
    checks++;
    if (nonred != 1 || lig(r) == 3'b100) begin
      failures++;
      $display("FAIL road %0d: %b %b %b %b", r + 1, LIG1, LIG2, LIG3, LIG4);
    end
  endtask

  initial begin
    longint n;
    repeat (3) @(posedge clk);
    #1 clr = 1'b0;
    checks++;
    if (PPeak !== 1'b0 || control !== 1'b0) begin failures++; $display("FAIL not off-peak"); end
    // road 1 starts with reset: 4 s green, give or take the cycle that the
    // first tick needs to reach the phase counter
    checks++;
    if (Seg_Out1 !== SEG[0] || Seg_Out2 !== SEG[7]) begin
      failures++;
      $display("FAIL countdown after reset: %h %h", Seg_Out1, Seg_Out2);
    end
    snapshot(0);
    wait_for(0, 3'b010, n);
    checks++;
    if (n < 4 * SEC - 2 || n > 4 * SEC + 2) begin failures++; $display("FAIL road 1 green %0d cycles", n); end
    snapshot(0);
    wait_for(1, 3'b001, n);
    checks++;
    if (n != 3 * SEC) begin failures++; $display("FAIL road 1 yellow %0d cycles", n); end
    $display("road 1 phase done at %0t", $time);
    // road 2: a complete phase measured from its first cycle
    checks++;
    if (Seg_Out1 !== SEG[0] || Seg_Out2 !== SEG[7]) begin
      failures++;
      $display("FAIL countdown at start of road 2: %h %h", Seg_Out1, Seg_Out2);
    end
    snapshot(1);
    // a vehicle runs the red light on road 3
    sb_snr[2] = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (cam_buz !== 1'b1) begin failures++; $display("FAIL no cam_buz on red crossing"); end
    sb_snr = '0;
    wait_for(1, 3'b010, n);
    n += 4;   // the cycles spent on the crossing
    checks++;
    if (n != 4 * SEC) begin failures++; $display("FAIL road 2 green %0d cycles", n); end
    snapshot(1);
    wait_for(2, 3'b001, n);
    checks++;
    if (n != 3 * SEC) begin failures++; $display("FAIL road 2 yellow %0d cycles", n); end
    checks++;
    if (LIG1 !== 3'b100 || LIG2 !== 3'b100 || LIG3 !== 3'b001 || LIG4 !== 3'b100) begin
      failures++;
      $display("FAIL handover to road 3: %b %b %b %b", LIG1, LIG2, LIG3, LIG4);
    end
    $display("road 2 phase done at %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
