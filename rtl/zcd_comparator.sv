// zcd_comparator: grid-polarity input stage.
//
// The external zero-crossing detector drives the FPGA with a logic level
// that is 1 while the grid voltage is positive and 0 while it is negative.
// This block brings that asynchronous level into the controller clock
// domain and produces the two polarity enables of the half-cycle counters:
//   o  = 1 during the positive half cycle (enables the positive counter)
//   oi = 1 during the negative half cycle (enables the negative counter)
// o and oi are always complementary, so exactly one counter runs.
//
// Timing: a change of i shows on o/oi after SYNC_STAGES rising clock edges
// (2 by default). Reset (asynchronous, active low) clears the synchroniser,
// i.e. the block starts as if the grid were in its negative half.
//
// The names i, o and oi and the role of the block (turning the ZCD level
// into one enable per polarity) follow the published block diagram. The
// two-flop synchroniser and the reset are this implementation's choices:
// the input comes from an unsynchronised external comparator.
module zcd_comparator #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i,    // ZCD level: 1 = grid positive
  output logic o,    // positive half-cycle enable
  output logic oi    // negative half-cycle enable
);
  timeunit 1ns;
  timeprecision 1ps;

  initial begin
    assert (SYNC_STAGES >= 1) else $error("SYNC_STAGES must be at least 1");
  end

  logic [SYNC_STAGES-1:0] sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= (sync_q << 1) | SYNC_STAGES'(i);
  end

  always_comb begin
    o  = sync_q[SYNC_STAGES-1];
    oi = ~sync_q[SYNC_STAGES-1];
  end

  // The two enables never overlap.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) o != oi);

endmodule
