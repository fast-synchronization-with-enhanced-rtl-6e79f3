// inverter_switch_top_tb: end-to-end test of the switching controller at its
// default parameters (50 MHz board clock, 18 MHz counting clock, 180000
// counts per half cycle, 30 degree notches, 7.2 degree lag compensation).
//
// A grid model toggles the ZCD level with chosen half-cycle lengths:
// nominal 50 Hz, a phase jump (one shortened and one lengthened half), a
// slow 49 Hz grid (half cycles longer than the counter modulus, so the
// counters wrap), a fast 51 Hz grid, and 50 Hz again. ZCD edges are placed
// on falling edges of the counting clock so that sampling is unambiguous.
//
// A timing model independent of the RTL predicts, for every counting-clock
// cycle, the gate state: after a ZCD edge the new polarity's phase is
// (edges since the change - 2) modulo 180000, and its diagonal is on for
// 22800 <= phase < 142800; the old polarity's counter runs for two more
// edges before it is cleared. All four gates are compared every cycle. The
// test also checks, through a full-bridge model, that no leg ever shorts,
// that every pulse lasts 120000 cycles (6.667 ms), that each pulse starts
// 1.267 ms after its zero crossing, and that the output follows a phase jump
// from the very next half cycle (a pulse still running when an early zero
// crossing arrives is cut short there). A final 45 degree late jump makes a
// half cycle outlast the 180000-count modulus by more than the window start,
// which opens the window a second time; the test confirms that limit. Each mechanism (positive and negative
// pulses, counter hold, counter wrap, phase jump, frequency change) is
// counted and must occur.
module inverter_switch_top_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned HALF  = 180000;
  localparam int unsigned START = 22800;
  localparam int unsigned STOP  = 142800;
  localparam realtime     T_C0  = 20.0 * 25.0 / 9.0;   // ns

  logic clock_50Mhz = 1'b0;
  logic rst_n = 1'b0;
  logic ZCD = 1'b0;
  logic s1, s2, s3, s4;
  logic signed [1:0] level;
  logic shoot;

  int checks = 0;
  int failures = 0;

  inverter_switch_top dut (.clock_50Mhz, .rst_n, .ZCD, .s1, .s2, .s3, .s4);
  full_bridge_model bridge (.s1, .s2, .s3, .s4, .level, .shoot_through(shoot));

  always #10 clock_50Mhz = ~clock_50Mhz;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t ns", what, $realtime);
    end
  endtask

  // ---------------------------------------------------------------- grid
  realtime zcd_time = 0.0;     // time of the last ZCD change
  int      n_halves = 0;       // ZCD edges produced
  bit      grid_done = 1'b0;
  int      n_jumps = 0;
  int      n_freq_changes = 0;

  task automatic half_cycle(input realtime len_ns);
    #(len_ns);
    @(negedge dut.c0);
    ZCD = ~ZCD;
    zcd_time = $realtime;
    n_halves++;
  endtask

  initial begin
    #1000;
    rst_n = 1'b1;
    // Nominal 50 Hz.
    repeat (6) half_cycle(10.0e6);
    // Phase jump: the grid advances by 54 degrees, then runs on normally.
    half_cycle(7.0e6);
    n_jumps++;
    repeat (3) half_cycle(10.0e6);
    // Phase jump the other way (18 degrees late).
    half_cycle(11.0e6);
    n_jumps++;
    repeat (3) half_cycle(10.0e6);
    // Slow grid, 49 Hz: half cycles of 183674 counts, the counters wrap.
    n_freq_changes++;
    repeat (6) half_cycle(1.0e9 / 98.0);
    // Fast grid, 51 Hz.
    n_freq_changes++;
    repeat (6) half_cycle(1.0e9 / 102.0);
    // Back to 50 Hz.
    n_freq_changes++;
    repeat (4) half_cycle(10.0e6);
    // A late jump of 45 degrees: the half cycle outlasts the counter modulus
    // by more than the 22.8 degree window start, so the window opens a
    // second time before the zero crossing cuts it.
    half_cycle(12.5e6);
    n_jumps++;
    half_cycle(10.0e6);
    #(2.0e6);
    grid_done = 1'b1;
  end

  // ---------------------------------------------------------------- model
  int  k = 0;                  // counting-clock edges since the ZCD change
  int  k_prev = 0;             // length of the previous phase in edges
  bit  pol = 1'b0;             // ZCD level seen at the last edge
  bit  armed = 1'b0;           // a ZCD change has been seen after reset
  int  n_wraps = 0;
  int  n_holds = 0;

  function automatic bit in_window(int phase);
    return (phase >= int'(START)) && (phase < int'(STOP));
  endfunction

  always @(posedge dut.c0) begin
    if (rst_n) begin
      if (ZCD != pol) begin
        if (armed) k_prev = k;
        armed = 1'b1;
        pol = ZCD;
        k = 1;
      end else begin
        k++;
        if (armed && k > 2 && ((k - 2) % int'(HALF)) == 0) n_wraps++;
        if (armed && k == 3) n_holds++;
      end
    end
  end

  // Compare every gate half a cycle after each edge.
  always @(negedge dut.c0) begin
    if (rst_n && armed && k_prev > 0) begin
      bit exp_new, exp_old;
      exp_new = (k >= 2) && in_window((k - 2) % int'(HALF));
      exp_old = (k <= 2) && in_window((k_prev + k - 2) % int'(HALF));
      if (pol) begin
        check(s1 == exp_new && s2 == exp_new, "positive diagonal");
        check(s3 == exp_old && s4 == exp_old, "negative diagonal");
      end else begin
        check(s3 == exp_new && s4 == exp_new, "negative diagonal");
        check(s1 == exp_old && s2 == exp_old, "positive diagonal");
      end
    end
    if (rst_n) check(!shoot, "no shoot-through");
  end

  // ---------------------------------------------------------------- pulses
  int      n_pos = 0;
  int      n_neg = 0;
  int      n_zero_level = 0;
  int      n_truncated = 0;
  int      n_retrigger = 0;
  realtime t_on = 0.0;
  int      jump_followed = 0;
  int      jump_half = -1;

  always @(posedge dut.c0) if (level == 0) n_zero_level++;

  always @(posedge s1 or posedge s3) if (rst_n) begin
    realtime lag;
    lag = $realtime - zcd_time;
    t_on = $realtime;
    // 22800 counts plus the 2-3 edge input delay, in ns. Before the first
    // ZCD edge the phase is counted from the release of reset instead. A
    // pulse after the counter wrapped comes one modulus later.
    if (n_halves > 0 && lag > HALF * T_C0) begin
      n_retrigger++;
      check(lag > (HALF + START + 1) * T_C0 && lag < (HALF + START + 4) * T_C0,
            "re-triggered pulse one modulus later");
    end else if (n_halves > 0) check(lag > (START + 1) * T_C0 && lag < (START + 4) * T_C0,
          "pulse starts 1.267 ms after the zero crossing");
    if (s1) begin
      n_pos++;
      check(ZCD == 1'b1, "positive pulse in the positive half");
    end else begin
      n_neg++;
      check(ZCD == 1'b0, "negative pulse in the negative half");
    end
  end

  always @(negedge s1 or negedge s3) if (rst_n) begin
    realtime width;
    width = $realtime - t_on;
    // A pulse cut short by a zero crossing that came early (phase jump).
    if (n_halves == 0) begin
      // Start-up, before the first zero crossing: nothing to check.
    end else if ($realtime - zcd_time < 4.0 * T_C0) n_truncated++;
    else check(width > (STOP - START) * T_C0 - 1.0 && width < (STOP - START) * T_C0 + 1.0,
          "pulse lasts 120 degrees");
  end

  // The half cycle right after each phase jump must already carry a pulse
  // aligned to its own zero crossing (checked above); count those pulses.
  always @(posedge s1 or posedge s3) if (rst_n) begin
    if (n_halves == 7 || n_halves == 11) jump_followed++;
  end

  // ---------------------------------------------------------------- end
  initial begin
    #1000;
    check(s1 == 1'b0 && s2 == 1'b0 && s3 == 1'b0 && s4 == 1'b0, "gates off after reset");
    wait (grid_done);
    $display("pos_pulses=%0d neg_pulses=%0d holds=%0d wraps=%0d jumps=%0d jump_followed=%0d truncated=%0d retrigger=%0d freq_changes=%0d zero_level_cycles=%0d",
             n_pos, n_neg, n_holds, n_wraps, n_jumps, jump_followed, n_truncated, n_retrigger, n_freq_changes, n_zero_level);
    check(n_pos == 16 && n_neg == 18, "pulses in both polarities");
    check(n_truncated == 2, "pulses cut by a zero crossing");
    check(n_retrigger == 1, "second window in an over-long half cycle");
    check(n_holds >= 30, "counter hold (sset) happened");
    check(n_wraps >= 6, "counter wrap happened");
    check(n_jumps == 3 && jump_followed == 2, "phase jumps followed in the next half cycle");
    check(n_freq_changes == 3, "frequency changes applied");
    check(n_zero_level > 0, "zero output level between pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
