// half_cycle_counter: phase timer for one polarity of the grid voltage.
//
// Two instances run in the controller, one for the positive and one for the
// negative half cycle. While its polarity enable (cnt_en) is high the
// counter counts clock cycles up from 0; at MODULUS-1 it wraps to 0. While
// its polarity is absent, sset is held high and the counter is loaded with
// SSET_VALUE (0) on every clock, so each half cycle is timed from the zero
// crossing that starts it. This restart at every zero crossing is what
// re-aligns the inverter with the grid within the next half cycle after a
// phase or frequency change. At the 18 MHz clock and a 50 Hz grid a half
// cycle is 180000 cycles, so q is the phase angle in millidegrees.
//
// Interface and timing: synchronous sset (priority over cnt_en), synchronous
// count enable, q updates on the rising clock edge. rst_n is an asynchronous
// active-low reset to SSET_VALUE.
//
// The up-counter, its modulus of 180000, its 18-bit output and the sset and
// cnt_en controls follow the published design. The load value on sset (0)
// and the reset input are choices of this implementation.
module half_cycle_counter
  import inverter_pkg::*;
#(
  parameter int unsigned MODULUS    = HALF_COUNTS,
  parameter int unsigned WIDTH      = COUNT_W,
  parameter int unsigned SSET_VALUE = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sset,    // synchronous load of SSET_VALUE
  input  logic             cnt_en,  // count enable
  output logic [WIDTH-1:0] q        // cycles since the half cycle began
);
  timeunit 1ns;
  timeprecision 1ps;

  initial begin
    assert (MODULUS >= 2 && longint'(MODULUS) <= (longint'(1) << WIDTH))
      else $error("MODULUS does not fit in WIDTH bits");
    assert (SSET_VALUE < MODULUS) else $error("SSET_VALUE out of range");
  end

  localparam logic [WIDTH-1:0] LAST  = WIDTH'(MODULUS - 1);
  localparam logic [WIDTH-1:0] START = WIDTH'(SSET_VALUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           q <= START;
    else if (sset)        q <= START;
    else if (cnt_en)      q <= (q == LAST) ? '0 : q + 1'b1;
  end

  a_in_range: assert property (@(posedge clk) disable iff (!rst_n) q <= LAST);

endmodule
