// switch_window_tb: exhaustive test of the pulse-window decoder.
//
// Sweeps every 18-bit count and compares F with a window computed here in
// degrees: the count is converted to an angle (180 degrees per 180000
// counts) and F must be 1 exactly for 22.8 <= angle < 142.8, i.e. a pulse
// notched by 30 degrees on both sides and advanced by 7.2 degrees. It also
// checks the pulse width (120 degrees) and that F is 0 at count 0, the value
// the counter holds during the opposite half cycle.
module switch_window_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic [17:0] S;
  logic F;
  int checks = 0;
  int failures = 0;
  int width = 0;
  int first_on = -1;
  int last_on = -1;

  switch_window dut (.S, .F);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s: S=%0d F=%b", what, S, F);
    end
  endtask

  initial begin
    for (int n = 0; n < (1 << 18); n++) begin
      real angle;
      bit expect_on;
      S = 18'(n);
      #1;
      angle = real'(n) * 180.0 / 180000.0;
      expect_on = (angle >= 30.0 - 7.2 - 1.0e-9) && (angle < 180.0 - 30.0 - 7.2 - 1.0e-9);
      check(F == expect_on, "window");
      if (F) begin
        width++;
        if (first_on < 0) first_on = n;
        last_on = n;
      end
    end
    check(width == 120000, "pulse width of 120 degrees");
    check(first_on == 22800, "pulse starts at 22.8 degrees");
    check(last_on == 142799, "pulse ends at 142.8 degrees");
    S = '0;
    #1 check(F == 1'b0, "off while counter is held at 0");
    $display("first_on=%0d last_on=%0d width=%0d", first_on, last_on, width);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
