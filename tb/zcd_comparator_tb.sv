// zcd_comparator_tb: self-checking test of the ZCD input stage.
//
// Drives a random polarity level and checks, every clock, that o equals the
// input as it was two rising edges earlier and that oi is its complement.
// Also checks that reset forces the negative-half state (o = 0, oi = 1).
module zcd_comparator_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic i = 1'b0;
  logic o, oi;
  int checks = 0;
  int failures = 0;

  zcd_comparator dut (.clk, .rst_n, .i, .o, .oi);

  always #27.778 clk = ~clk;

  // Input history as seen by the rising edges: hist[0] newest.
  logic [3:0] hist = '0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: i_hist=%b o=%b oi=%b", what, $time, hist, o, oi);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check(o == 1'b0 && oi == 1'b1, "reset state");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // Hold the level for a random run so both short and long pulses occur.
      if ($urandom_range(0, 3) == 0) i = ~i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      hist <= {hist[2:0], i};
      cyc  <= cyc + 1;
    end
  end

  // Compare half a period after each edge, once two edges of history exist.
  always @(negedge clk) begin
    if (rst_n && cyc >= 2) begin
      check(o == hist[1], "o follows input after two edges");
      check(oi == ~hist[1], "oi is the complement");
    end
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
