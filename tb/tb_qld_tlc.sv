// tb_qld_tlc: end-to-end test of the traffic light controller.
//
// The clock is scaled to CLK_HZ cycles per second so that hours of junction
// time fit in a short simulation; every duration below is checked in clock
// cycles. A monitor watches the four signal heads and records every phase
// it sees: road, green and yellow time, the queue level the road had when
// the phase started, and the mode (`control`) it ran in. Each record is
// compared with the timing tables (off-peak 7/15/22/30 s, peak
// 15/30/45/60 s, 3 s yellow). The pedestrian groups are checked against the
// vehicle lights every cycle, the countdown digits at every phase start, and
// the HH:MM display by decoding a full digit scan.
//
// Scenario: off-peak cycle with all four queue levels; time set to 06:59
// with the HR_set/MIN_set buttons; roll-over to 07:00 switching to peak;
// peak cycle with all four levels; emergency vehicles on roads 3 and 1
// (warning, green, yellow, resumption of the interrupted phase); red-light
// crossings that must trigger cam_buz and green-light crossings that must
// not. Each of these mechanisms is counted and must occur at least once.
module tb_qld_tlc;
  localparam int CLK_HZ = 10;
  localparam int LEN [2][4] = '{'{7, 15, 22, 30}, '{15, 30, 45, 60}};
  localparam logic [7:0] SEG [10] = '{8'h3F, 8'h06, 8'h5B, 8'h4F, 8'h66,
                                       8'h6D, 8'h7D, 8'h07, 8'h7F, 8'h6F};

  logic clk = 1'b0, clr = 1'b1;
  logic TMR_set = 1'b0, HR_set = 1'b0, MIN_set = 1'b0;
  logic [3:0] emg_snr = '0, sb_snr = '0;
  logic [3:0] sns [4];
  logic [3:0] Digit_sel;
  logic [2:0] LIG1, LIG2, LIG3, LIG4;
  logic [3:0] PdCrs1, PdCrs2, PdCrs3, PdCrs4;
  logic [7:0] segment_o, Seg_Out1, Seg_Out2;
  logic cam_buz, control, PPeak;

  int checks = 0, failures = 0;
  longint cyc = 0;

  qld_tlc #(.CLK_HZ(CLK_HZ), .SCAN_HZ(1)) dut (
    .clk(clk), .clr(clr), .TMR_set(TMR_set), .HR_set(HR_set), .MIN_set(MIN_set),
    .emg_snr(emg_snr), .sb_snr(sb_snr), .sns1(sns[0]), .sns2(sns[1]), .sns3(sns[2]), .sns4(sns[3]),
    .Digit_sel(Digit_sel), .LIG1(LIG1), .LIG2(LIG2), .LIG3(LIG3), .LIG4(LIG4),
    .PdCrs1(PdCrs1), .PdCrs2(PdCrs2), .PdCrs3(PdCrs3), .PdCrs4(PdCrs4),
    .segment_o(segment_o), .Seg_Out1(Seg_Out1), .Seg_Out2(Seg_Out2),
    .cam_buz(cam_buz), .control(control), .PPeak(PPeak));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl_of(logic [3:0] s);
    if (s[3]) return 3;
    if (s[2]) return 2;
    if (s[1]) return 1;
    return 0;
  endfunction

  function automatic int seg_val(logic [7:0] s);
    for (int d = 0; d < 10; d++) if (s[6:0] == SEG[d][6:0]) return d;
    return -1;
  endfunction

  function automatic void fail(string msg);
    failures++;
    if (failures < 30) $display("FAIL t=%0d %s", cyc, msg);
  endfunction

  // ------------------------------------------------------------------ monitor
  logic [2:0] lig [4], lig_q [4];
  logic [3:0] pdc [4];
  logic [3:0] sns_edge [4];
  longint g_start [4], y_start [4];
  int     g_lvl [4], g_mode [4], g_disp [4];
  bit     g_cut [4];
  bit     warn_q = 0, in_emg = 0;
  longint warn_start, emg_g_start, emg_y_start;
  int     emg_road, cut_road = -1;
  longint cut_used;
  // mechanism counters
  int n_phase [2][4];
  int n_emg = 0, n_resume = 0, n_viol = 0, n_green_cross = 0, n_mode_sw = 0, n_set = 0, n_disp = 0;

  always_comb begin
    lig[0] = LIG1; lig[1] = LIG2; lig[2] = LIG3; lig[3] = LIG4;
    pdc[0] = PdCrs1; pdc[1] = PdCrs2; pdc[2] = PdCrs3; pdc[3] = PdCrs4;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int i = 0; i < 4; i++) sns_edge[i] = sns[i];
  end

  always @(negedge clk) begin
    if (!clr) begin
      bit warn_now;
      warn_now = (lig[0] == 3'b010) && (lig[1] == 3'b010) && (lig[2] == 3'b010) && (lig[3] == 3'b010);
      // pedestrian groups follow the vehicle lights
      for (int i = 0; i < 4; i++) begin
        logic [3:0] e;
        e = warn_now ? 4'b0011 : (lig[i] == 3'b100) ? 4'b1001 : 4'b0110;
        checks++;
        if (pdc[i] !== e) fail($sformatf("PdCrs%0d=%b with LIG%0d=%b", i + 1, pdc[i], i + 1, lig[i]));
      end
      // emergency warning starts
      if (warn_now && !warn_q) begin
        warn_start = cyc; in_emg = 1; n_emg++;
        cut_road = -1;
        for (int i = 0; i < 4; i++)
          if (lig_q[i] != 3'b100) begin
            cut_road = i; cut_used = cyc - g_start[i];
          end
      end
      if (!warn_now && warn_q) begin
        checks++;
        // the request arrives part-way through a second, so the first
        // second of the warning is partial
        if (cyc - warn_start > 5 * CLK_HZ || cyc - warn_start <= 4 * CLK_HZ) fail($sformatf("warning lasted %0d cycles", cyc - warn_start));
      end
      for (int i = 0; i < 4; i++) begin
        if (lig[i] == 3'b010 && lig_q[i] == 3'b001 && !warn_now) y_start[i] = cyc;
        if (lig[i] == 3'b100 && lig_q[i] == 3'b010 && !warn_q) begin
          checks += 2;
          if (in_emg && i == emg_road) begin
            if (y_start[i] - emg_g_start != 52 * CLK_HZ) fail($sformatf("emergency green %0d cycles", y_start[i] - emg_g_start));
            if (cyc - y_start[i] != 3 * CLK_HZ) fail($sformatf("emergency yellow %0d cycles", cyc - y_start[i]));
            in_emg = 0;
          end else if (g_start[i] > 10) begin
            int len;
            len = LEN[g_mode[i]][g_lvl[i]];
            // a phase resumed after an emergency may be longer by the part
            // of a second that was running when it was interrupted
            if (cyc - g_start[i] < longint'(len * CLK_HZ) ||
                cyc - g_start[i] > longint'(len * CLK_HZ) + (g_cut[i] ? CLK_HZ - 1 : 0))
              fail($sformatf("road %0d phase %0d cycles, expected %0d s (mode %0d level %0d)",
                             i + 1, cyc - g_start[i], len, g_mode[i], g_lvl[i] + 1));
            if (cyc - y_start[i] != 3 * CLK_HZ) fail($sformatf("road %0d yellow %0d cycles", i + 1, cyc - y_start[i]));
            if (g_disp[i] != len) fail($sformatf("countdown showed %0d at phase start, expected %0d", g_disp[i], len));
            n_phase[g_mode[i]][g_lvl[i]]++;
          end
        end
      end
      for (int i = 0; i < 4; i++) begin
        if (lig[i] == 3'b001 && lig_q[i] == 3'b010 && !warn_q && in_emg && i == emg_road) begin
          // the emergency road was also the interrupted one: its yellow
          // leads straight back into the resumed green
          checks += 2;
          if (y_start[i] - emg_g_start != 52 * CLK_HZ) fail($sformatf("emergency green %0d cycles", y_start[i] - emg_g_start));
          if (cyc - y_start[i] != 3 * CLK_HZ) fail($sformatf("emergency yellow %0d cycles", cyc - y_start[i]));
          in_emg = 0;
        end
        if (lig[i] == 3'b001 && lig_q[i] != 3'b001) begin
          if (in_emg && !warn_now && lig_q[i] == 3'b010 && warn_q) begin
            emg_road = i; emg_g_start = cyc;
          end else if (!in_emg && i == cut_road) begin
            // the interrupted phase resumes; its green+yellow total must be kept
            n_resume++;
            g_start[i] = cyc - cut_used;
            g_cut[i]   = 1;
            cut_road = -1;
          end else begin
            g_start[i] = cyc;
            g_lvl[i]   = lvl_of(sns_edge[i]);
            g_mode[i]  = control;
            g_disp[i]  = seg_val(Seg_Out1) * 10 + seg_val(Seg_Out2);
            g_cut[i]   = 0;
          end
        end
      end
      warn_q = warn_now;
      for (int i = 0; i < 4; i++) lig_q[i] = lig[i];
    end
  end

  // ------------------------------------------------------------------ helpers
  task automatic wait_s(int s);
    repeat (s * CLK_HZ) @(posedge clk);
    #1;
  endtask

  task automatic press(output logic btn_dummy, input bit hour);
    btn_dummy = 1'b0;
    if (hour) HR_set = 1'b1; else MIN_set = 1'b1;
    repeat (3) @(posedge clk);
    #1 HR_set = 1'b0; MIN_set = 1'b0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  // decode one full scan of the HH:MM display
  task automatic read_time(output int hh, output int mm);
    int d [4];
    for (int k = 0; k < 4; k++) begin
      int guard = 0;
      while (Digit_sel !== (4'b1000 >> k) && guard < 100) begin @(negedge clk); guard++; end
      d[k] = seg_val(segment_o);
    end
    hh = d[0] * 10 + d[1];
    mm = d[2] * 10 + d[3];
  endtask

  task automatic check_time(int hh, int mm);
    int d [4];
    for (int k = 0; k < 4; k++) begin
      int guard = 0;
      while (Digit_sel !== (4'b1000 >> k) && guard < 100) begin @(negedge clk); guard++; end
      d[k] = seg_val(segment_o);
    end
    checks++;
    n_disp++;
    if (d[0] * 10 + d[1] != hh || d[2] * 10 + d[3] != mm)
      fail($sformatf("display %0d%0d:%0d%0d expected %0d:%0d", d[0], d[1], d[2], d[3], hh, mm));
  endtask

  task automatic crossing(int road, bit expect_hit);
    logic [2:0] road_light;
    bit buz_seen;
    road_light = lig[road];
    buz_seen = 0;
    sb_snr[road] = 1'b1;
    repeat (2) @(posedge clk);
    #1 sb_snr[road] = 1'b0;
    for (int c = 0; c < 6; c++) begin
      @(negedge clk);
      if (cam_buz) buz_seen = 1;
    end
    #1;
    checks++;
    if (expect_hit) n_viol++; else n_green_cross++;
    if (buz_seen != expect_hit) fail($sformatf("crossing on road %0d (light %b): cam_buz %0b", road + 1, road_light, buz_seen));
  endtask

  task automatic wait_light(int road, logic [2:0] code);
    int guard = 0;
    while (lig[road] !== code && guard < 100000) begin @(posedge clk); guard++; end
    #1;
  endtask

  // ------------------------------------------------------------------ stimulus
  initial begin
    logic dmy;
    int r, hh, mm;
    sns[0] = 4'b0001; sns[1] = 4'b0011; sns[2] = 4'b0111; sns[3] = 4'b1111;
    repeat (3) @(posedge clk);
    #1 clr = 1'b0;
    checks++;
    if (PPeak !== 1'b0 || control !== 1'b0) fail("not off-peak after reset");
    check_time(0, 0);

    // off-peak: one full round of the four levels
    wait_light(0, 3'b100);
    wait_light(0, 3'b001);
    wait_light(0, 3'b100);

    // red-light crossing on a red road, and a crossing on the green road
    r = -1;
    for (int i = 0; i < 4; i++) if (lig[i] == 3'b001) r = i;
    crossing((r + 1) % 4, 1'b1);
    if (r >= 0) crossing(r, 1'b0);

    // emergency on road 3 in off-peak
    wait_light(1, 3'b001);
    wait_s(4);
    emg_snr[2] = 1'b1;
    wait_s(20);
    crossing(2, 1'b0);          // the emergency road is green
    crossing(0, 1'b1);          // road 1 is red during the emergency
    wait_s(50);
    emg_snr[2] = 1'b0;

    // set 06:59 with the buttons
    TMR_set = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    read_time(hh, mm);
    for (int h = hh; h != 6; h = (h + 1) % 24) press(dmy, 1'b1);
    for (int m = mm; m != 59; m = (m + 1) % 60) press(dmy, 1'b0);
    check_time(6, 59);
    n_set++;
    TMR_set = 1'b0;
    wait_s(30);
    checks++;
    if (PPeak !== 1'b0) fail("peak before 07:00");
    check_time(6, 59);
    wait_s(31);
    checks++;
    if (PPeak !== 1'b1) fail("no peak after 07:00");
    else n_mode_sw++;
    check_time(7, 0);

    // peak: let every road run at least once with all four levels
    sns[0] = 4'b1111; sns[1] = 4'b0001; sns[2] = 4'b0011; sns[3] = 4'b0111;
    wait_light(0, 3'b001);
    wait_light(0, 3'b100);
    wait_light(0, 3'b001);
    wait_light(0, 3'b100);
    wait_light(0, 3'b001);
    // emergency on road 1 while road 1 itself has green
    wait_s(3);
    emg_snr[0] = 1'b1;
    wait_s(2);
    emg_snr[0] = 1'b0;
    wait_s(70);
    wait_light(3, 3'b001);
    wait_light(3, 3'b100);

    for (int p = 0; p < 2; p++)
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (n_phase[p][l] == 0) fail($sformatf("no %s phase at level %0d", p ? "peak" : "off-peak", l + 1));
      end
    checks++;
    if (n_emg < 2 || n_resume < 2) fail($sformatf("emergencies %0d resumes %0d", n_emg, n_resume));
    checks++;
    if (n_viol == 0 || n_green_cross == 0 || n_mode_sw == 0 || n_set == 0 || n_disp == 0) fail("mechanism missing");
    $display("phases offpeak %0d %0d %0d %0d peak %0d %0d %0d %0d", n_phase[0][0], n_phase[0][1], n_phase[0][2],
             n_phase[0][3], n_phase[1][0], n_phase[1][1], n_phase[1][2], n_phase[1][3]);
    $display("emergencies=%0d resumes=%0d violations=%0d green_crossings=%0d mode_switches=%0d time_sets=%0d display_reads=%0d",
             n_emg, n_resume, n_viol, n_green_cross, n_mode_sw, n_set, n_disp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
