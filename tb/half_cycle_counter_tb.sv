// half_cycle_counter_tb: self-checking test of the half-cycle phase counter
// at its full modulus of 180000.
//
// A reference count kept in the testbench is compared with q every clock
// while the test applies: a long count with wrap-around from 179999 to 0,
// random pauses of cnt_en, random sset pulses (load 0, also while cnt_en is
// high, where sset must win) and a mid-count reset. The number of wraps seen
// and the time between them (exactly 180000 enabled cycles) are checked.
module half_cycle_counter_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned MOD = 180000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sset = 1'b0;
  logic cnt_en = 1'b0;
  logic [17:0] q;
  int checks = 0;
  int failures = 0;
  longint unsigned ref_q = 0;
  int wraps = 0;
  int ssets = 0;
  longint unsigned en_cycles = 0;

  half_cycle_counter dut (.clk, .rst_n, .sset, .cnt_en, .q);

  always #27.778 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: q=%0d ref=%0d", what, $time, q, ref_q);
    end
  endtask

  // Reference model, updated on the same edges.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_q <= 0;
    else if (sset) begin
      ref_q <= 0;
      ssets <= ssets + 1;
    end else if (cnt_en) begin
      en_cycles <= en_cycles + 1;
      if (ref_q + 1 == MOD) begin
        ref_q <= 0;
        wraps <= wraps + 1;
        // Each wrap comes exactly MOD enabled cycles after the last load.
        check(en_cycles + 1 == MOD * longint'(wraps + 1), "wrap period");
      end else ref_q <= ref_q + 1;
    end
  end

  always @(negedge clk) check(longint'(q) == ref_q, "count");

  initial begin
    repeat (3) @(negedge clk);
    check(q == 0, "reset value");
    rst_n = 1'b1;
    // Phase 1: uninterrupted count through two wraps.
    cnt_en = 1'b1;
    repeat (2 * MOD + 100) @(negedge clk);
    check(wraps == 2, "two wraps");
    // Phase 2: random enables and loads.
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      cnt_en = ($urandom_range(0, 3) != 0);
      sset   = ($urandom_range(0, 999) == 0);
    end
    sset = 1'b0;
    check(ssets > 0, "sset exercised");
    // Phase 3: asynchronous reset in the middle of a count.
    cnt_en = 1'b1;
    repeat (1234) @(negedge clk);
    #5 rst_n = 1'b0;
    #1 check(q == 0, "async reset");
    @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
