// inverter_switch_top: zero-crossing-synchronised switching controller for a
// single-phase full-bridge square-wave inverter tied to a 50 Hz grid.
//
// The grid voltage reaches the FPGA only as the one-bit level of an external
// zero-crossing detector (ZCD = 1 while the grid is positive). The
// controller times every half cycle afresh from the zero crossing that
// starts it:
//   clock_pll          50 MHz x 9/25 = 18 MHz, so a 10 ms half cycle is
//                      180000 cycles and one degree is 1000 cycles
//   zcd_comparator     synchronises ZCD, gives o (positive) and oi (negative)
//   u_cnt_pos / neg    half_cycle_counter, counting while their polarity is
//                      present and held at 0 (sset = NOT polarity) otherwise
//   u_sw_pos / neg     switch_window, high from 22.8 to 142.8 degrees of the
//                      half cycle: a 30 degree notch on each side removes the
//                      third harmonic, and a 7.2 degree advance cancels the
//                      lag of the output LC filter
// s1 and s2 (one diagonal of the bridge, +Vdc on the load) are both driven
// by the positive window, s3 and s4 (the other diagonal, -Vdc) by the
// negative one. Between the windows all four switches are off. Because the
// counters restart at each zero crossing, a grid phase or frequency step is
// followed from the next half cycle on, i.e. within 10 ms.
//
// Timing: a ZCD edge starts its counter 3 c0 edges later (two synchroniser
// stages and the counter register); a gate output then rises START counts
// later, START = 22800 cycles = 1.267 ms after the zero crossing.
// rst_n (asynchronous, active low) clears the synchroniser and counters;
// all gates are then off.
//
// The blocks, their connections, the PLL ratio, the counter modulus and
// width, the sharing of one window by s1/s2 and by s3/s4, and the 30 and
// 7.2 degree angles follow the published design. The reset input, the
// synchroniser and the exact window decoding are this implementation's.
module inverter_switch_top
  import inverter_pkg::*;
#(
  parameter int unsigned PLL_MUL   = 9,
  parameter int unsigned PLL_DIV   = 25,
  parameter int unsigned HALF      = HALF_COUNTS,
  parameter int unsigned ALPHA     = ALPHA_MDEG,
  parameter int unsigned LAG_COMP  = LAG_COMP_MDEG
) (
  input  logic clock_50Mhz,  // board oscillator
  input  logic rst_n,        // asynchronous reset, active low
  input  logic ZCD,          // zero-crossing detector level, 1 = grid positive
  output logic s1,           // gate, positive diagonal (high-side leg A)
  output logic s2,           // gate, positive diagonal (low-side leg B)
  output logic s3,           // gate, negative diagonal (high-side leg B)
  output logic s4            // gate, negative diagonal (low-side leg A)
);
  timeunit 1ns;
  timeprecision 1ps;

  logic               c0;
  logic               zcd_pos, zcd_neg;
  logic [COUNT_W-1:0] q_pos, q_neg;
  logic               f_pos, f_neg;

  clock_pll #(.MUL(PLL_MUL), .DIV(PLL_DIV)) u_pll (
    .inclk0 (clock_50Mhz),
    .c0     (c0)
  );

  zcd_comparator u_cmp (
    .clk   (c0),
    .rst_n (rst_n),
    .i     (ZCD),
    .o     (zcd_pos),
    .oi    (zcd_neg)
  );

  half_cycle_counter #(.MODULUS(HALF)) u_cnt_pos (
    .clk    (c0),
    .rst_n  (rst_n),
    .sset   (~zcd_pos),
    .cnt_en (zcd_pos),
    .q      (q_pos)
  );

  half_cycle_counter #(.MODULUS(HALF)) u_cnt_neg (
    .clk    (c0),
    .rst_n  (rst_n),
    .sset   (~zcd_neg),
    .cnt_en (zcd_neg),
    .q      (q_neg)
  );

  switch_window #(.HALF(HALF), .ALPHA(ALPHA), .LAG_COMP(LAG_COMP)) u_sw_pos (
    .S (q_pos),
    .F (f_pos)
  );

  switch_window #(.HALF(HALF), .ALPHA(ALPHA), .LAG_COMP(LAG_COMP)) u_sw_neg (
    .S (q_neg),
    .F (f_neg)
  );

  always_comb begin
    s1 = f_pos;
    s2 = f_pos;
    s3 = f_neg;
    s4 = f_neg;
  end

  // No leg may have both its switches on (s1/s4 share leg A, s3/s2 leg B).
  a_no_shoot_through: assert property (
    @(posedge c0) disable iff (!rst_n) !(s1 && s4) && !(s3 && s2));

endmodule
