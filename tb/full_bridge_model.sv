// full_bridge_model: behavioural model of the power stage, for testbenches.
//
// An ideal single-phase full bridge of four switches on a DC link: leg A is
// s1 (high) over s4 (low), leg B is s3 (high) over s2 (low). The load sees
// +Vdc when the diagonal s1/s2 conducts, -Vdc when s3/s4 conducts and 0 when
// neither diagonal is on. level reports that as +1 / 0 / -1. shoot_through
// flags a leg with both of its switches on, which would short the DC link.
// Gate drivers, dead time and diode conduction are not modelled.
module full_bridge_model (
  input  logic              s1,
  input  logic              s2,
  input  logic              s3,
  input  logic              s4,
  output logic signed [1:0] level,
  output logic              shoot_through
);
  always_comb begin
    shoot_through = (s1 && s4) || (s3 && s2);
    if (s1 && s2 && !s3 && !s4)      level = 2'sd1;
    else if (s3 && s4 && !s1 && !s2) level = -2'sd1;
    else                             level = 2'sd0;
  end
endmodule
