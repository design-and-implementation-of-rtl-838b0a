// tb_phase_ctrl: checks the phase sequencer cycle by cycle against a
// reference model kept in elapsed seconds (rather than a countdown).
//
// The one-second tick is compressed to one pulse every TICK_EVERY cycles.
// Queue levels change at random, the mode switches between peak and
// off-peak, and emergency requests arrive on random roads, sometimes on two
// roads at once, sometimes held high past the end of the sequence and
// sometimes during a running sequence. Every cycle the lights, count, road,
// warning flag and mode are compared. Phase lengths are checked through
// the count: each (mode, level) pair must start at least once, as must the
// emergency sequence and the resumption of an interrupted phase.
module tb_phase_ctrl;
  import qld_pkg::*;
  localparam int TICK_EVERY = 2;
  // phase length [peak][level], from the timing tables
  localparam int LEN [2][4] = '{'{7, 15, 22, 30}, '{15, 30, 45, 60}};

  logic clk = 1'b0, rst = 1'b1, tick = 1'b0, peak = 1'b0;
  level_t [3:0] level;
  logic   [3:0] emg = '0;
  light_t [3:0] lights;
  road_t        road;
  count_t       count;
  logic         in_emg, warn, mode;
  int checks = 0, failures = 0;

  // reference model state
  int  m_road, m_len, m_el, m_mode;
  bit  e_on;
  int  e_road, e_el;
  logic [3:0] e_prev;
  int  starts [2][4];
  int  n_emg = 0, n_resume = 0, n_ignored = 0, n_multi = 0;

  phase_ctrl dut (.clk(clk), .rst(rst), .tick(tick), .peak(peak), .level(level), .emg(emg),
                  .lights(lights), .road(road), .count(count), .in_emg(in_emg), .warn(warn),
                  .mode(mode));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated with the inputs seen at each rising edge
  always @(posedge clk) begin
    logic [3:0] nw;
    if (rst) begin
      m_road = 0; m_len = LEN[peak][level[0]]; m_el = 0; m_mode = peak;
      e_on = 0; e_road = 0; e_el = 0; e_prev = '0;
    end else begin
      nw = emg & ~e_prev;
      e_prev = emg;
      if (!e_on) begin
        if (nw != 0) begin
          e_on = 1; e_el = 0; n_emg++;
          if ($countones(nw) > 1) n_multi++;
          for (int i = 3; i >= 0; i--) if (nw[i]) e_road = i;
        end else if (tick) begin
          m_el++;
          if (m_el == m_len) begin
            m_road = (m_road + 1) % 4;
            m_len  = LEN[peak][level[m_road]];
            m_el   = 0;
            m_mode = peak;
            starts[peak][level[m_road]]++;
          end
        end
      end else begin
        if (nw != 0) n_ignored++;
        if (tick) begin
          e_el++;
          if (e_el == 60) begin e_on = 0; n_resume++; end
        end
      end
    end
  end

  // compare on the falling edge
  always @(negedge clk) begin
    if (!rst) begin
      logic [2:0] exp_l [4];
      int exp_cnt, exp_road;
      bit exp_warn;
      exp_warn = e_on && e_el < 5;
      for (int i = 0; i < 4; i++) begin
        if (exp_warn) exp_l[i] = 3'b010;
        else if (e_on) exp_l[i] = (i != e_road) ? 3'b100 : (e_el < 57) ? 3'b001 : 3'b010;
        else exp_l[i] = (i != m_road) ? 3'b100 : (m_el < m_len - 3) ? 3'b001 : 3'b010;
      end
      exp_cnt  = e_on ? 60 - e_el : m_len - m_el;
      exp_road = e_on ? e_road : m_road;
      checks++;
      if (lights[0] !== exp_l[0] || lights[1] !== exp_l[1] || lights[2] !== exp_l[2] ||
          lights[3] !== exp_l[3] || int'(count) != exp_cnt || int'(road) != exp_road ||
          warn !== exp_warn || in_emg !== e_on || mode !== 1'(m_mode)) begin
        failures++;
        if (failures < 20)
          $display("FAIL t=%0t lights=%b %b %b %b cnt=%0d road=%0d warn=%0b emg=%0b mode=%0b exp %b %b %b %b cnt=%0d road=%0d warn=%0b emg=%0b mode=%0d",
                   $time, lights[0], lights[1], lights[2], lights[3], count, road, warn, in_emg, mode,
                   exp_l[0], exp_l[1], exp_l[2], exp_l[3], exp_cnt, exp_road, exp_warn, e_on, m_mode);
      end
    end
  end

  // one-second tick, compressed
  initial begin
    forever begin
      repeat (TICK_EVERY - 1) @(posedge clk);
      #1 tick = 1'b1;
      @(posedge clk);
      #1 tick = 1'b0;
    end
  end

  initial begin
    int sec = 0;
    int emg_hold = 0;
    for (int i = 0; i < 4; i++) level[i] = level_t'($urandom);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // main stimulus, one step per second
    for (sec = 0; sec < 8000; sec++) begin
      repeat (TICK_EVERY) @(posedge clk);
      #1;
      if ($urandom_range(7) == 0) level[$urandom_range(3)] = level_t'($urandom);
      if (sec % 400 == 399) peak = ~peak;
      if (emg_hold > 0) begin
        emg_hold--;
        if (emg_hold == 0) emg = '0;
      end else if ($urandom_range(249) == 0) begin
        emg = ($urandom_range(4) == 0) ? 4'($urandom | 1) : 4'(1 << $urandom_range(3));
        emg_hold = $urandom_range(90) + 1;
      end else if (e_on && $urandom_range(29) == 0) begin
        emg = 4'(1 << $urandom_range(3));   // request during a running sequence
        emg_hold = 3;
      end
    end
    for (int p = 0; p < 2; p++)
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (starts[p][l] == 0) begin failures++; $display("FAIL no phase with peak=%0d level=%0d", p, l + 1); end
      end
    checks++;
    if (n_emg < 2 || n_resume < 2) begin failures++; $display("FAIL emergencies %0d resumes %0d", n_emg, n_resume); end
    checks++;
    if (n_ignored == 0) begin failures++; $display("FAIL no request during a sequence"); end
    $display("emergencies=%0d resumes=%0d simultaneous=%0d ignored=%0d", n_emg, n_resume, n_multi, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
