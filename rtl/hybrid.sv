// hybrid: top level of the low-depth reversible arithmetic design.
//
// Two datapaths share one adiabatic phase controller and one register load
// enable:
//
//  1. Gate unit. data_in[3:0] passes through hybrid_rev_gate_adiabatic, which
//     applies the HNG, Peres or Fredkin gate (or identity) chosen by
//     mode[1:0]. Its result is loaded into data_out[3:0] by four
//     clock-enabled flip-flops with asynchronous clear; parity is the XOR of
//     the four registered output bits.
//  2. Arithmetic unit. A[WIDTH-1:0], B[WIDTH-1:0] and Cin feed rev_adder
//     (one HNG full adder per bit) giving SUM and Cout, and
//     fredkin_comparator giving Sel = (A > B), Eq = (A == B), X = min and
//     Y = max. These outputs are registered the same way.
//
// Timing: adiabatic_controller cycles CHARGE, EVALUATE, HOLD, RECOVER on
// successive clk edges and all output registers load at the edge ending
// EVALUATE. An input held stable for NUM_PHASES (4) cycles is therefore
// visible on the outputs within at most 4 clock edges, and outputs change at
// most once every 4 cycles. rst (active high, asynchronous) clears every
// output register and returns the controller to CHARGE; the next load
// happens on the second rising clk edge after rst falls.
//
// Following the design: the ports clk, rst, data_in[3:0], mode[1:0],
// data_out[3:0] and parity; the enable_bus[3:0] and the 4-bit A, B, Cin,
// SUM and Cout seen in its simulation; the comparator's X, Y and Sel; the
// gate unit and controller instances (core, ctrl); clock-enabled output
// registers with asynchronous clear, loaded on the controller's enable.
// This implementation's choices: what parity covers, the phase sequence,
// registering the arithmetic outputs with the same enable, and the Eq port.
module hybrid
  import rev_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  // gate unit
  input  logic [GATE_LINES-1:0] data_in,
  input  logic [1:0]            mode,
  output logic [GATE_LINES-1:0] data_out,
  output logic                  parity,
  output logic [NUM_PHASES-1:0] enable_bus,
  // arithmetic unit
  input  logic [WIDTH-1:0]      A,
  input  logic [WIDTH-1:0]      B,
  input  logic                  Cin,
  output logic [WIDTH-1:0]      SUM,
  output logic                  Cout,
  output logic [WIDTH-1:0]      X,
  output logic [WIDTH-1:0]      Y,
  output logic                  Sel,
  output logic                  Eq
);

  phase_e                phase;
  logic [NUM_PHASES-1:0] phase_en;
  logic                  capture;
  logic [GATE_LINES-1:0] core_out;
  logic [WIDTH-1:0]      sum_c, x_c, y_c;
  logic                  cout_c, sel_c, eq_c;

  adiabatic_controller ctrl (
    .clk     (clk),
    .rst     (rst),
    .phase   (phase),
    .phase_en(phase_en),
    .capture (capture)
  );

  hybrid_rev_gate_adiabatic core (
    .data_in (data_in),
    .mode    (mode_e'(mode)),
    .data_out(core_out)
  );

  rev_adder #(.WIDTH(WIDTH)) u_adder (
    .a   (A),
    .b   (B),
    .cin (Cin),
    .sum (sum_c),
    .cout(cout_c)
  );

  fredkin_comparator #(.WIDTH(WIDTH)) u_cmp (
    .a  (A),
    .b  (B),
    .x  (x_c),
    .y  (y_c),
    .sel(sel_c),
    .eq (eq_c)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      data_out <= '0;
      SUM      <= '0;
      Cout     <= 1'b0;
      X        <= '0;
      Y        <= '0;
      Sel      <= 1'b0;
      Eq       <= 1'b0;
    end else if (capture) begin
      data_out <= core_out;
      SUM      <= sum_c;
      Cout     <= cout_c;
      X        <= x_c;
      Y        <= y_c;
      Sel      <= sel_c;
      Eq       <= eq_c;
    end
  end

  assign parity = ^data_out;

  // The one-hot phase lines leave the design as enable_bus, for an external
  // adiabatic power-clock generator; capture must be high exactly in the
  // EVALUATE phase.
  assign enable_bus = phase_en;

  a_capture_in_evaluate: assert property (@(posedge clk) disable iff (rst)
    capture == (phase == PH_EVALUATE) && capture == phase_en[PH_EVALUATE]);

endmodule
