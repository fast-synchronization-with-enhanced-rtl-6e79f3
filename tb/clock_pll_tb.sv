// clock_pll_tb: self-checking test of the clock synthesiser model.
//
// Feeds a 50 MHz reference and checks that c0 runs at 50 x 9/25 = 18 MHz:
// each period is 55.556 ns within 5 ps (the 1 ps time step and the re-alignment at each group start), each high phase is half of that,
// exactly 9 c0 rising edges fall in every 25 reference periods, and c0
// rises together with the reference at the start of each group (0 degree
// phase).
module clock_pll_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic inclk0 = 1'b0;
  logic c0;
  int checks = 0;
  int failures = 0;

  clock_pll dut (.inclk0, .c0);

  always #10 inclk0 = ~inclk0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  realtime t_rise = 0.0;
  realtime t_fall = 0.0;
  int rises = 0;
  localparam realtime TOUT = 20.0 * 25.0 / 9.0;

  always @(posedge c0) begin
    if (rises > 0 && ($realtime - t_rise) < 100.0)
      check(($realtime - t_rise) > TOUT - 0.005 && ($realtime - t_rise) < TOUT + 0.005,
            "c0 period");
    t_rise = $realtime;
    rises++;
  end

  always @(negedge c0) begin
    t_fall = $realtime;
    // Ignore the settling of c0 at time 0, before its first rising edge.
    if (rises > 0) check((t_fall - t_rise) > TOUT / 2.0 - 0.002 && (t_fall - t_rise) < TOUT / 2.0 + 0.002,
          "c0 high time");
  end

  initial begin
    int r0;
    // Wait for the model to measure the reference and start.
    repeat (2) @(posedge inclk0);
    #1;
    for (int g = 0; g < 200; g++) begin
      r0 = rises;
      check(c0 == 1'b1, "c0 aligned to a group start");
      repeat (25) @(posedge inclk0);
      #1;
      check(rises - r0 == 9, "9 output cycles per 25 input cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
