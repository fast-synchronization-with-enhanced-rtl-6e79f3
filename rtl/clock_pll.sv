// clock_pll: behavioural model of the FPGA's clock synthesiser (not
// synthesisable; a vendor PLL takes its place in an implementation).
//
// It multiplies the frequency of inclk0 by MUL/DIV with 50 % duty cycle and
// zero phase shift: 50 MHz x 9/25 = 18 MHz, the clock that makes one 10 ms
// grid half cycle exactly 180000 counts. The model measures the period of
// the first two inclk0 cycles and then runs c0 from the next rising edge of
// inclk0, re-aligning every MUL output cycles to the rising inclk0 edge that
// starts a group of DIV input cycles. c0 stays 0 until then; there is no
// lock output.
//
// The port names, the 50 MHz input, the 9/25 ratio, 0 degree phase and 50 %
// duty cycle are the published configuration. The measurement scheme and
// the behaviour before the first output edge are this model's own.
module clock_pll #(
  parameter int unsigned MUL = 9,
  parameter int unsigned DIV = 25
) (
  input  logic inclk0,  // reference clock (50 MHz)
  output logic c0       // inclk0 x MUL / DIV
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime t_first;
  realtime t_in;
  realtime half;

  initial begin
    c0 = 1'b0;
    @(posedge inclk0);
    t_first = $realtime;
    @(posedge inclk0);
    t_in = $realtime - t_first;
    half = t_in * real'(DIV) / (2.0 * real'(MUL));
    forever begin
      // On the input rising edge that starts a group of DIV input periods:
      // emit MUL output periods, which end together with the group.
      fork
        begin
          for (int unsigned k = 0; k < MUL; k++) begin
            c0 = 1'b1;
            #(half);
            c0 = 1'b0;
            if (k != MUL - 1) #(half);
          end
        end
      join_none
      repeat (DIV) @(posedge inclk0);
    end
  end

endmodule
