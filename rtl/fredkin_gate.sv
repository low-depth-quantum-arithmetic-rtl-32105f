// fredkin_gate: the 3x3 reversible Fredkin (controlled swap) gate.
//
// Mapping (control CTL, data inputs I1, I2; outputs CTL_O, O1, O2):
//   CTL_O = CTL
//   O1    = CTL ? I2 : I1
//   O2    = CTL ? I1 : I2
// When the control is 1 the two data lines are exchanged, otherwise they pass
// straight. It preserves the number of ones (conservative logic) and is its
// own inverse. Fixing one data input to a constant turns O1 into an AND or a
// 2:1 multiplexer, which is how fredkin_comparator builds its compare logic.
// The equations are the standard Fredkin definition. Purely combinational.
module fredkin_gate (
  input  logic ctl,
  input  logic i1,
  input  logic i2,
  output logic ctl_o,
  output logic o1,
  output logic o2
);

  always_comb begin
    ctl_o = ctl;
    o1    = ctl ? i2 : i1;
    o2    = ctl ? i1 : i2;
  end

endmodule
