// adiabatic_controller: sequencer for the four phases of an adiabatic
// (charge-recovery) power clock: CHARGE, EVALUATE, HOLD, RECOVER, repeating.
//
// phase     : current phase, advances by one on every rising clk edge.
// phase_en  : one-hot copy of phase, bit k set while phase == k, one enable
//             line per power-clock phase.
// capture   : high during EVALUATE; the output registers of the hybrid design
//             load on the clock edge that ends EVALUATE and keep their value
//             through HOLD, RECOVER and CHARGE, so results change once every
//             NUM_PHASES (4) cycles.
// rst is an asynchronous, active-high reset to CHARGE.
//
// The design names this controller and shows that it takes clk and rst and
// drives the enable of the output registers; the four-phase sequence and the
// choice of EVALUATE as the capture phase are this implementation's own.
module adiabatic_controller
  import rev_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  output phase_e                phase,
  output logic [NUM_PHASES-1:0] phase_en,
  output logic                  capture
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) phase <= PH_CHARGE;
    else     phase <= phase_e'(phase + 2'd1);
  end

  always_comb begin
    phase_en        = '0;
    phase_en[phase] = 1'b1;
    capture         = (phase == PH_EVALUATE);
  end

endmodule
