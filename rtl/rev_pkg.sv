// rev_pkg: types and constants shared by the reversible arithmetic blocks.
//
// mode_e selects which reversible gate the four-line gate unit applies to its
// data lines. The two-bit mode port and the three gate types (HNG, Peres,
// Fredkin) follow the design; the code assigned to each gate, and the use of
// the fourth code as a straight-through (identity) mapping, are this design's
// own choice.
//
// phase_e names the four phases of the adiabatic power-clock sequence driven
// by adiabatic_controller. The four-phase charge / evaluate / hold / recover
// cycle is the usual scheme for adiabatic CMOS logic; the design itself names
// the controller but does not give its phases.
package rev_pkg;

  typedef enum logic [1:0] {
    MODE_HNG     = 2'b00,  // HNG 4x4 gate: full adder on lines 0..2, line 3 XORed into carry
    MODE_PERES   = 2'b01,  // Peres 3x3 gate on lines 0..2, line 3 passes
    MODE_FREDKIN = 2'b10,  // Fredkin 3x3 gate on lines 0..2 (line 0 controls), line 3 passes
    MODE_BYPASS  = 2'b11   // identity on all four lines
  } mode_e;

  typedef enum logic [1:0] {
    PH_CHARGE   = 2'b00,
    PH_EVALUATE = 2'b01,
    PH_HOLD     = 2'b10,
    PH_RECOVER  = 2'b11
  } phase_e;

  localparam int unsigned NUM_PHASES = 4;

  // Number of data lines of the gate unit: the HNG gate is 4x4.
  localparam int unsigned GATE_LINES = 4;

endpackage
